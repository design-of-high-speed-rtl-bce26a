// oec_prototype1 - 8-GHz octa-phase error corrector with coprime spacing.
// Problem: eight clock phases meant to be T/8 (15.6 ps at 8 GHz) apart arrive
// with skew. Each phase passes a main delay line (dcdl, 5 bit, 0.5 ps/LSB);
// one shared calibration loop sets the eight codes.
// Loop: an 8:2 MUX (two mux8_5b slices) picks a pair of corrected clocks three
// phases apart, CK(i) and CK(i+3). CK(i) goes through the octa-delay line
// (6 bit, 0.2 ps/LSB, about 3T/8) and the single BBPD tells whether it arrived
// after or before CK(i+3). Comparing at 3T/8 instead of T/8 relaxes the delay
// that must be generated; since 3 is coprime to 8, the eight comparisons
// chain around all phases and three of them sum to 9T/8, so equal 3T/8 steps
// force equal T/8 steps. The selection runs on CK_MUX0/4 (mux_sel_gen) and
// steps backwards one pair every four periods; the BBPD is sampled on
// CK_MUX1/4, whose start is ordered by pwrup_seq. bbpd_des gathers one word per
// round of eight pairs and oec_dlf updates one main code or the octa code.
// When oec_dlf reports steady state, clk_gate cells in the eight calibration
// paths stop the loop clocks; dropping cal_en restarts the loop (codes kept).
// An 8:1 monitor MUX brings one corrected clock out.
// Interface: ck_in[k] is input phase k, ck_out[k] the corrected phase. rst_n
// asynchronous active low (codes to mid-scale). Update rate: one word per
// 32 clock periods (4 ns at 8 GHz).
// Structure and code widths follow the document; mid-scale reset codes, the
// lock criterion and the monitor select port are this design's choices.
module oec_prototype1 #(
  parameter int unsigned MAIN_W       = 5,
  parameter int unsigned OCTA_W       = 6,
  parameter real         MAIN_LSB_PS  = 0.5,
  parameter real         OCTA_LSB_PS  = 0.2,
  parameter real         OCTA_BASE_PS = 40.0,
  parameter int unsigned LOCK_LEN     = 64,
  parameter int unsigned LOCK_BAND    = 2
) (
  input  logic                   rst_n,
  input  logic                   cal_en,
  input  logic [7:0]             ck_in,
  output logic [7:0]             ck_out,
  input  logic [2:0]             mon_sel,
  output logic                   ck_mon,
  output logic [7:0][MAIN_W-1:0] c_main,
  output logic [OCTA_W-1:0]      c_octa,
  output logic                   locked,
  output logic                   seq_err
);
  timeunit 1ps; timeprecision 1fs;

  logic [7:0] ck_g, ck_g3;
  logic       loop_rst_n, run;
  logic       ck_mux0, ck_mux1, ck0_div4, ck1_div4, en1, ck_d, perr;
  logic [4:0] sel;
  logic [2:0] idx;
  logic [0:0][7:0] word;
  logic       valid;

  assign loop_rst_n = rst_n & cal_en;
  assign run        = cal_en & ~locked;

  for (genvar k = 0; k < 8; k++) begin : g_ph
    dcdl #(.CODE_W(MAIN_W), .LSB_PS(MAIN_LSB_PS)) u_main (
      .ck_in(ck_in[k]), .code(c_main[k]), .ck_out(ck_out[k]));
    clk_gate u_gate (.ck(ck_out[k]), .en(run), .ck_g(ck_g[k]));
    assign ck_g3[k] = ck_g[(k + occ_pkg::M_SPACING) % occ_pkg::N_PH];
  end

  mux8_5b u_mux0 (.ck(ck_g),  .sel(sel), .ck_out(ck_mux0));
  mux8_5b u_mux1 (.ck(ck_g3), .sel(sel), .ck_out(ck_mux1));

  div4        u_div0 (.ck(ck_mux0), .rst_n(loop_rst_n), .ck_div4(ck0_div4));
  mux_sel_gen u_sel  (.clk_div4(ck0_div4), .rst_n(loop_rst_n), .idx(idx), .sel(sel));
  pwrup_seq   u_pwr  (.ck_mux1(ck_mux1), .rst_n(loop_rst_n), .ck0_div4(ck0_div4), .en1(en1));
  div4        u_div1 (.ck(ck_mux1), .rst_n(en1), .ck_div4(ck1_div4));

  dcdl #(.CODE_W(OCTA_W), .LSB_PS(OCTA_LSB_PS), .BASE_PS(OCTA_BASE_PS)) u_octa (
    .ck_in(ck_mux0), .code(c_octa), .ck_out(ck_d));

  bbpd u_pd (.i1(ck_d), .i2(ck_mux1), .ck_smp(ck1_div4), .rst_n(loop_rst_n), .phase_err(perr));

  bbpd_des #(.LANES(1)) u_des (
    .ck(ck1_div4), .rst_n(loop_rst_n), .din(perr), .idx(idx), .sel4(sel[4]),
    .word(word), .valid(valid), .seq_err(seq_err));

  oec_dlf #(.CODE_W(MAIN_W), .OCTA_W(OCTA_W), .LOCK_LEN(LOCK_LEN), .LOCK_BAND(LOCK_BAND)) u_dlf (
    .clk(ck1_div4), .rst_n(rst_n), .lock_clr_n(cal_en), .valid(valid), .err(word[0]),
    .c_main(c_main), .c_octa(c_octa), .locked(locked));

  assign ck_mon = ck_out[mon_sel];
endmodule
