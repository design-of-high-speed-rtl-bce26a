// octa_clock_corrector - 8-GHz octa-phase clock corrector with phase (OEC) and
// duty-cycle (DCC) correction sharing one clock selector.
// Each phase passes a clock control cell whose delay code (6 bit) moves both
// edges and whose duty code (6 bit) moves only the falling edge.
// Three 5-bit controlled 8:1 MUXes, driven by one selection generator, pick for
// pair index i: CK(i) (shared MUX), CK(i+3) (OEC MUX) and CK(i+4) (DCC MUX).
// OEC path: CK(i) through the 3T/8 octa-delay line against CK(i+3) in one BBPD,
// exactly as in the phase-only corrector; oec_dlf sets the delay and octa codes.
// DCC path: the edge converter turns the falling edge of CK(i) into a rising
// edge and compares it, in a second BBPD, with the rising edge of the
// complement CK(i+4). Once the phase loop has put neighbours T/8 apart, CK(i+4)
// rises exactly T/2 after CK(i), so this compares the high time with T/2 and
// needs no extra delay line. dcc_dlf steps the duty codes at one eighth of the
// OEC update rate so the two loops do not pull on each other.
// Both BBPD results are sampled on CK_OEC/4 and leave a 2:16 deserializer
// (bbpd_des, LANES = 2) as one OEC word and one DCC word per round.
// cal_en = 0 is the calibration disable mode: the calibration clocks are gated
// and the codes hold. rst_n asynchronous active low sets all codes mid-scale.
// Structure and widths follow the document; the CK(i+4) wiring of the DCC MUX,
// the shared sampling clock and mid-scale reset are this design's choices.
module octa_clock_corrector #(
  parameter int unsigned DLY_W        = 6,
  parameter int unsigned DUTY_W       = 6,
  parameter int unsigned OCTA_W       = 6,
  parameter int unsigned DCC_DIV      = 8,
  parameter real         OCTA_LSB_PS  = 0.2,
  parameter real         OCTA_BASE_PS = 40.0
) (
  input  logic                   rst_n,
  input  logic                   cal_en,
  input  logic [7:0]             ck_in,
  output logic [7:0]             ck_out,
  output logic [7:0][DLY_W-1:0]  c_dly,
  output logic [7:0][DUTY_W-1:0] c_duty,
  output logic [OCTA_W-1:0]      c_octa,
  output logic                   seq_err
);
  timeunit 1ps; timeprecision 1fs;

  logic [7:0] ck_g, ck_g3, ck_g4;
  logic       loop_rst_n;
  logic       ck_sh, ck_oec, ck_dcc, ck0_div4, ck1_div4, en1;
  logic       ck_d, ec_f, ec_r, perr_oec, perr_dcc, valid, locked_unused;
  logic [4:0] sel;
  logic [2:0] idx;
  logic [1:0][7:0] word;

  assign loop_rst_n = rst_n & cal_en;

  for (genvar k = 0; k < 8; k++) begin : g_ph
    clock_control_cell #(.DLY_W(DLY_W), .DUTY_W(DUTY_W)) u_ccc (
      .ck_in(ck_in[k]), .c_dly(c_dly[k]), .c_duty(c_duty[k]), .ck_out(ck_out[k]));
    clk_gate u_gate (.ck(ck_out[k]), .en(cal_en), .ck_g(ck_g[k]));
    assign ck_g3[k] = ck_g[(k + occ_pkg::M_SPACING) % occ_pkg::N_PH];
    assign ck_g4[k] = ck_g[(k + occ_pkg::COMP_SPACE) % occ_pkg::N_PH];
  end

  mux8_5b u_mux_sh  (.ck(ck_g),  .sel(sel), .ck_out(ck_sh));
  mux8_5b u_mux_oec (.ck(ck_g3), .sel(sel), .ck_out(ck_oec));
  mux8_5b u_mux_dcc (.ck(ck_g4), .sel(sel), .ck_out(ck_dcc));

  div4        u_div0 (.ck(ck_sh), .rst_n(loop_rst_n), .ck_div4(ck0_div4));
  mux_sel_gen u_sel  (.clk_div4(ck0_div4), .rst_n(loop_rst_n), .idx(idx), .sel(sel));
  pwrup_seq   u_pwr  (.ck_mux1(ck_oec), .rst_n(loop_rst_n), .ck0_div4(ck0_div4), .en1(en1));
  div4        u_div1 (.ck(ck_oec), .rst_n(en1), .ck_div4(ck1_div4));

  dcdl #(.CODE_W(OCTA_W), .LSB_PS(OCTA_LSB_PS), .BASE_PS(OCTA_BASE_PS)) u_octa (
    .ck_in(ck_sh), .code(c_octa), .ck_out(ck_d));
  bbpd u_pd_oec (.i1(ck_d), .i2(ck_oec), .ck_smp(ck1_div4), .rst_n(loop_rst_n), .phase_err(perr_oec));

  edge_converter u_ec (.ck_f(ck_sh), .ck_r(ck_dcc), .out_f(ec_f), .out_r(ec_r));
  bbpd u_pd_dcc (.i1(ec_f), .i2(ec_r), .ck_smp(ck1_div4), .rst_n(loop_rst_n), .phase_err(perr_dcc));

  bbpd_des #(.LANES(2)) u_des (
    .ck(ck1_div4), .rst_n(loop_rst_n), .din({perr_dcc, perr_oec}), .idx(idx), .sel4(sel[4]),
    .word(word), .valid(valid), .seq_err(seq_err));

  oec_dlf #(.CODE_W(DLY_W), .OCTA_W(OCTA_W)) u_oec_dlf (
    .clk(ck1_div4), .rst_n(rst_n), .lock_clr_n(1'b1), .valid(valid), .err(word[0]),
    .c_main(c_dly), .c_octa(c_octa), .locked(locked_unused));

  dcc_dlf #(.DUTY_W(DUTY_W), .DCC_DIV(DCC_DIV)) u_dcc_dlf (
    .clk(ck1_div4), .rst_n(rst_n), .valid(valid), .err(word[1]), .c_duty(c_duty));
endmodule
