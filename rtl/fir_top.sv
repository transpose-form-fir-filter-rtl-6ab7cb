// fir_top: the three transpose-form FIR filters side by side.
//
//  - reconf_block_fir: block filter (L = 4 samples per clock) whose
//    coefficients come from a channel-selectable coefficient store,
//    computed with general multipliers (inner-product units).
//  - fixed_block_fir: block filter (L = 4, N = 16) with constant
//    coefficients, computed with shift-and-add MCM units.
//  - transpose_fir: the basic one-sample-per-clock transpose-form filter
//    (N = 6) with coefficient inputs.
// They serve different applications and share only the clock and reset;
// each has its own ports, prefixed rc_, fx_ and tf_. Timing of each is that
// of its module: block filters return a block two clock edges after taking
// it, the single-rate filter's output belongs to the current input.
module fir_top #(
  parameter int RC_L   = 4,
  parameter int RC_N   = 6,
  parameter int RC_W   = 8,
  parameter int RC_CW  = 8,
  parameter int RC_OW  = 16,
  parameter int RC_NCH = 4,
  parameter int RC_CHW = (RC_NCH > 1) ? $clog2(RC_NCH) : 1,
  parameter logic signed [RC_CW-1:0] RC_COEF [RC_NCH][RC_N] = '{
    '{8'sd0, 8'sd1, 8'sd2, 8'sd3, 8'sd4, 8'sd5},
    '{8'sd5, 8'sd4, 8'sd3, 8'sd2, 8'sd1, 8'sd0},
    '{8'sd1, 8'sd0, 8'sd0, 8'sd0, 8'sd0, 8'sd0},
    '{-8'sd3, 8'sd7, -8'sd12, 8'sd25, 8'sd100, -8'sd128}
  },
  parameter int FX_L   = 4,
  parameter int FX_N   = 16,
  parameter int FX_W   = 4,
  parameter int FX_CW  = 4,
  parameter int FX_OW  = 4,
  parameter int FX_H [FX_N] = '{1, 2, 3, 4, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0},
  parameter int TF_N   = 6,
  parameter int TF_W   = 8,
  parameter int TF_CW  = 8,
  parameter int TF_OW  = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // reconfigurable block filter
  input  logic                    rc_in_valid,
  input  logic signed [RC_W-1:0]  rc_x_blk [RC_L],
  input  logic [RC_CHW-1:0]       rc_ch,
  output logic                    rc_out_valid,
  output logic signed [RC_OW-1:0] rc_y_blk [RC_L],
  // fixed-coefficient block filter
  input  logic                    fx_in_valid,
  input  logic signed [FX_W-1:0]  fx_x_blk [FX_L],
  output logic                    fx_out_valid,
  output logic signed [FX_OW-1:0] fx_y_blk [FX_L],
  // single-rate transpose-form filter
  input  logic                    tf_in_valid,
  input  logic signed [TF_W-1:0]  tf_x,
  input  logic signed [TF_CW-1:0] tf_h [TF_N],
  output logic signed [TF_OW-1:0] tf_y
);

  reconf_block_fir #(.L(RC_L), .N(RC_N), .W(RC_W), .CW(RC_CW), .OW(RC_OW),
                     .NCH(RC_NCH), .CHW(RC_CHW), .COEF(RC_COEF)) u_reconf (
    .clk, .rst_n, .in_valid(rc_in_valid), .x_blk(rc_x_blk), .ch(rc_ch),
    .out_valid(rc_out_valid), .y_blk(rc_y_blk)
  );

  fixed_block_fir #(.L(FX_L), .N(FX_N), .W(FX_W), .CW(FX_CW), .OW(FX_OW),
                    .H(FX_H)) u_fixed (
    .clk, .rst_n, .in_valid(fx_in_valid), .x_blk(fx_x_blk),
    .out_valid(fx_out_valid), .y_blk(fx_y_blk)
  );

  transpose_fir #(.N(TF_N), .W(TF_W), .CW(TF_CW), .OW(TF_OW)) u_tf (
    .clk, .rst_n, .in_valid(tf_in_valid), .x(tf_x), .h(tf_h), .y(tf_y)
  );

endmodule
