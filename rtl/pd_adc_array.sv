// pd_adc_array: behavioural model of the photo-detector (PD) array chip with
// its column-parallel 8-bit AD converters. It is not synthesizable hardware
// in the real system (photodiodes and ADCs are analog); it stands in for the
// sensor so the digital system can be simulated.
//
// The scene is a ROWS x COLS array of 8-bit light intensities written through
// the scene_* port (a testbench's way of putting an image in front of the
// sensor). conv_start asks for column col_sel: ROWS converters sample that
// column together and, ADC_CYCLES clocks later, present the ROWS results on
// pix_out with a one-clock conv_done pulse. pix_out holds its value until the
// next conversion ends.
//
// 128x128 pixels, 128 ADCs working in parallel and 8-bit gray scale are the
// sensor's; the conversion latency and the handshake are this model's choice.
module pd_adc_array
  import cpv_pkg::*;
#(
  parameter int ROWS       = 128,
  parameter int COLS       = 128,
  parameter int ADC_CYCLES = 4,
  localparam int RW = $clog2(ROWS),
  localparam int CW = $clog2(COLS)
) (
  input  logic                clk,
  input  logic                rst_n,
  // scene (light falling on the sensor)
  input  logic                scene_we,
  input  logic [RW-1:0]       scene_row,
  input  logic [CW-1:0]       scene_col,
  input  logic [PIX_BITS-1:0] scene_val,
  // readout control
  input  logic [CW-1:0]       col_sel,
  input  logic                conv_start,
  output logic                conv_done,
  output logic [PIX_BITS-1:0] pix_out [ROWS]
);

  logic [PIX_BITS-1:0] scene [ROWS][COLS];
  logic [PIX_BITS-1:0] sampled [ROWS];
  int                  busy_cnt;
  logic                busy;

  always_ff @(posedge clk) begin
    if (scene_we) scene[scene_row][scene_col] <= scene_val;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      busy_cnt  <= 0;
      conv_done <= 1'b0;
      for (int r = 0; r < ROWS; r++) begin
        pix_out[r] <= '0;
        sampled[r] <= '0;
      end
    end else begin
      conv_done <= 1'b0;
      if (conv_start && !busy) begin
        busy     <= 1'b1;
        busy_cnt <= ADC_CYCLES - 1;
        for (int r = 0; r < ROWS; r++) sampled[r] <= scene[r][col_sel];
      end else if (busy) begin
        if (busy_cnt == 0) begin
          busy      <= 1'b0;
          conv_done <= 1'b1;
          for (int r = 0; r < ROWS; r++) pix_out[r] <= sampled[r];
        end else begin
          busy_cnt <= busy_cnt - 1;
        end
      end
    end
  end

endmodule
