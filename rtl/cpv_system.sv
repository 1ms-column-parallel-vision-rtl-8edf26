// cpv_system: the Column Parallel Vision system, a 1 ms-cycle vision front end
// for visual servoing.
//
// A 128x128 photo-detector array with 128 column-parallel 8-bit ADCs hands
// its image to a 128x128 array of bit-serial SIMD processing elements, one PE
// per pixel, through one shift register per PE row, so an entire frame moves
// in 128 parallel lanes instead of through a single pixel stream. A controller
// runs the user program from its main memory, broadcasts one PE instruction
// per step, and reads back image features through a summation circuit that
// counts the PE outputs of the whole array in the same clock. The host (a DSP
// network in the original system, which also closes the pan/tilt servo loop)
// shares the controller's main memory through host_*.
//
// Blocks: pd_adc_array (behavioural sensor model) -> pe_array (pe_chip tiles
// of s3pe PEs and shift_segment registers) -> summation_circuit ->
// cpv_controller (main_memory, buffer_memory_1d, ctrl_alu, frame_sync).
//
// Interface: scene_* writes the light intensities in front of the sensor;
// host_* is the host port of the main memory; start runs the program from
// address 0 and halted reports that it reached HALT. frame_busy, stall,
// pe_valid and feature expose activity for observation. All logic is
// synchronous to clk with a synchronous active-low reset rst_n.
module cpv_system
  import cpv_pkg::*;
#(
  parameter int ROWS       = 128,
  parameter int COLS       = 128,
  parameter int CHIP_ROWS  = 8,
  parameter int CHIP_COLS  = 16,
  parameter int MAIN_DEPTH = 65536,
  parameter int BUF_LINES  = 16,
  parameter int ADC_CYCLES = 4,
  localparam int RW    = $clog2(ROWS),
  localparam int CW    = $clog2(COLS),
  localparam int MAW   = $clog2(MAIN_DEPTH),
  localparam int SUM_W = $clog2(ROWS*COLS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // scene in front of the sensor
  input  logic              scene_we,
  input  logic [RW-1:0]     scene_row,
  input  logic [CW-1:0]     scene_col,
  input  logic [PIX_BITS-1:0] scene_val,
  // host DSP network
  input  logic              start,
  output logic              halted,
  input  logic [MAW-1:0]    host_addr,
  input  logic              host_we,
  input  logic [31:0]       host_wdata,
  output logic [31:0]       host_rdata,
  // observation
  output logic              frame_busy,
  output logic              stall,
  output logic              pe_valid,
  output logic [SUM_W-1:0]  feature
);

  pe_instr_t            pe_instr;
  logic                 pe_latch, pe_shift;
  logic [CW-1:0]        pd_col_sel;
  logic                 pd_conv_start, pd_conv_done;
  logic [PIX_BITS-1:0]  pd_pix [ROWS];
  logic [ROWS-1:0]      x_in, x_out;
  logic [COLS-1:0]      y_in, y_out;
  logic [ROWS-1:0][COLS-1:0] own;

  pd_adc_array #(.ROWS(ROWS), .COLS(COLS), .ADC_CYCLES(ADC_CYCLES)) u_pd (
    .clk, .rst_n,
    .scene_we, .scene_row, .scene_col, .scene_val,
    .col_sel   (pd_col_sel),
    .conv_start(pd_conv_start),
    .conv_done (pd_conv_done),
    .pix_out   (pd_pix)
  );

  pe_array #(
    .ROWS(ROWS), .COLS(COLS), .CHIP_ROWS(CHIP_ROWS), .CHIP_COLS(CHIP_COLS)
  ) u_pe (
    .clk, .rst_n,
    .instr      (pe_instr),
    .instr_valid(pe_valid),
    .latch      (pe_latch),
    .shift      (pe_shift),
    .pix_col    (pd_pix),
    .x_in, .y_in, .x_out, .y_out,
    .own
  );

  summation_circuit #(.ROWS(ROWS), .COLS(COLS)) u_sum (
    .bits(own),
    .sum (feature)
  );

  cpv_controller #(
    .ROWS(ROWS), .COLS(COLS), .MAIN_DEPTH(MAIN_DEPTH), .BUF_LINES(BUF_LINES)
  ) u_ctrl (
    .clk, .rst_n,
    .start, .halted, .host_addr, .host_we, .host_wdata, .host_rdata,
    .pe_instr, .pe_valid, .pe_latch, .pe_shift,
    .sum_in   (feature),
    .x_edge   (x_out),
    .y_edge   (y_out),
    .x_drive  (x_in),
    .y_drive  (y_in),
    .pd_col_sel, .pd_conv_start, .pd_conv_done,
    .frame_busy, .stall
  );

endmodule
