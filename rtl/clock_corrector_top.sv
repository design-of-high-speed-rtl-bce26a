// clock_corrector_top - the two octa-phase clock correctors side by side.
// p1: octa-phase error corrector (phase only, coprime 3T/8 comparison, eight
//     main delay lines, loop gated off once settled).
// p2: octa-phase clock corrector with phase and duty-cycle loops sharing one
//     clock selector (clock control cells with delay and duty codes).
// Each has its own eight-phase clock input, reset and calibration enable, and
// brings out its corrected clocks and codes. Nothing is shared between them.
module clock_corrector_top (
  input  logic            p1_rst_n,
  input  logic            p1_cal_en,
  input  logic [7:0]      p1_ck_in,
  output logic [7:0]      p1_ck_out,
  input  logic [2:0]      p1_mon_sel,
  output logic            p1_ck_mon,
  output logic [7:0][4:0] p1_c_main,
  output logic [5:0]      p1_c_octa,
  output logic            p1_locked,
  output logic            p1_seq_err,
  input  logic            p2_rst_n,
  input  logic            p2_cal_en,
  input  logic [7:0]      p2_ck_in,
  output logic [7:0]      p2_ck_out,
  output logic [7:0][5:0] p2_c_dly,
  output logic [7:0][5:0] p2_c_duty,
  output logic [5:0]      p2_c_octa,
  output logic            p2_seq_err
);
  timeunit 1ps; timeprecision 1fs;

  oec_prototype1 u_p1 (
    .rst_n(p1_rst_n), .cal_en(p1_cal_en), .ck_in(p1_ck_in), .ck_out(p1_ck_out),
    .mon_sel(p1_mon_sel), .ck_mon(p1_ck_mon), .c_main(p1_c_main), .c_octa(p1_c_octa),
    .locked(p1_locked), .seq_err(p1_seq_err));

  octa_clock_corrector u_p2 (
    .rst_n(p2_rst_n), .cal_en(p2_cal_en), .ck_in(p2_ck_in), .ck_out(p2_ck_out),
    .c_dly(p2_c_dly), .c_duty(p2_c_duty), .c_octa(p2_c_octa), .seq_err(p2_seq_err));
endmodule
