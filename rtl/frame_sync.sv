// frame_sync: the controller's frame-transfer sequencer, which produces the
// control signals for the PD array and the shift strobes for the PE array.
//
// A start pulse begins one frame transfer. The sequencer asks the PD array to
// convert column COLS-1, waits for its conv_done, and on that same clock
// strobes shift so every PE row's shift register takes the fresh pixel; then it
// goes on with column COLS-2, and so on down to column 0. Reading the last
// column first leaves, after COLS shifts, each pixel in the stage of the PE of
// its own column. When column 0 has been shifted in, busy falls and ready
// rises; ready stays high until the next start.
//
// Timing: if conv_done comes L clocks after the clock of the request, one
// column takes L + 1 clocks and busy lasts COLS * (L + 1) clocks. With the
// sensor model's defaults L = 5, so a 128-column frame takes 768 clocks.
// start while busy is ignored.
//
// Column-parallel transfer of a frame in column order through shift registers
// is the architecture's; the handshake, the column order and the sticky ready
// flag are this design's choice.
module frame_sync #(
  parameter int COLS = 128,
  localparam int CW = $clog2(COLS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          ready,
  output logic [CW-1:0] pd_col_sel,
  output logic          pd_conv_start,
  input  logic          pd_conv_done,
  output logic          shift
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT} state_e;
  state_e state;

  assign busy          = (state != S_IDLE);
  assign pd_conv_start = (state == S_REQ);
  assign shift         = (state == S_WAIT) && pd_conv_done;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ready      <= 1'b0;
      pd_col_sel <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state      <= S_REQ;
          ready      <= 1'b0;
          pd_col_sel <= CW'(COLS - 1);
        end
        S_REQ:  state <= S_WAIT;
        S_WAIT: if (pd_conv_done) begin
          if (pd_col_sel == '0) begin
            state <= S_IDLE;
            ready <= 1'b1;
          end else begin
            state      <= S_REQ;
            pd_col_sel <= pd_col_sel - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
