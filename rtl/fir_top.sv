// fir_top: the two filters of this design side by side, each with its own
// ports: the fixed-coefficient 32-tap distributed-arithmetic filter (da_*)
// and the 40-tap filter with reloadable coefficients (dda_*). They share the
// clock and reset and nothing else. See da_fir and dda_fir for the interfaces
// and their timing.
module fir_top
  import fir_pkg::*;
#(
  parameter int unsigned DA_TAPS    = 32,
  parameter int unsigned DA_DATA_W  = 12,
  parameter int unsigned DA_COEF_W  = 12,
  parameter int unsigned DDA_TAPS   = 40,
  parameter int unsigned DDA_DATA_W = 4,
  parameter int unsigned DDA_COEF_W = 8,
  localparam int unsigned DA_OUT_W  = DA_COEF_W + 2 + $clog2(DA_TAPS/8) + DA_DATA_W + 1,
  localparam int unsigned DDA_OUT_W = DDA_COEF_W + 2 + $clog2(DDA_TAPS/8) + DDA_DATA_W + 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // fixed-coefficient filter
  input  logic                         da_in_valid,
  output logic                         da_in_ready,
  input  logic signed [DA_DATA_W-1:0]  da_in_data,
  output logic                         da_out_valid,
  output logic signed [DA_OUT_W-1:0]   da_out_data,
  // reconfigurable-coefficient filter
  input  logic                         dda_in_valid,
  output logic                         dda_in_ready,
  input  logic signed [DDA_DATA_W-1:0] dda_in_data,
  input  logic                         dda_coef_valid,
  input  logic signed [DDA_COEF_W-1:0] dda_coef_in,
  output logic                         dda_lut_updating,
  output logic                         dda_out_valid,
  output logic signed [DDA_OUT_W-1:0]  dda_out_data
);

  da_fir #(.TAPS(DA_TAPS), .DATA_W(DA_DATA_W), .COEF_W(DA_COEF_W)) u_da (
    .clk, .rst_n,
    .in_valid(da_in_valid), .in_ready(da_in_ready), .in_data(da_in_data),
    .out_valid(da_out_valid), .out_data(da_out_data)
  );

  dda_fir #(.TAPS(DDA_TAPS), .DATA_W(DDA_DATA_W), .COEF_W(DDA_COEF_W)) u_dda (
    .clk, .rst_n,
    .in_valid(dda_in_valid), .in_ready(dda_in_ready), .in_data(dda_in_data),
    .coef_valid(dda_coef_valid), .coef_in(dda_coef_in),
    .lut_updating(dda_lut_updating),
    .out_valid(dda_out_valid), .out_data(dda_out_data)
  );

endmodule
