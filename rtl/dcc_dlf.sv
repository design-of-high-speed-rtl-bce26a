// dcc_dlf - digital loop filter of the duty-cycle corrector.
// Input: one 8-bit word err per selection round, err[k] being the BBPD result
// of CK(k)'s falling edge (turned into a rising edge by the edge converter)
// against the rising edge of its complement CK(k+4). err[k] = 1 means the
// falling edge came late, so the high phase is too long: the duty code of
// clock k goes down; err[k] = 0 moves it up. The duty part of the clock control
// cell moves only falling edges, so these updates never disturb the phase loop.
// Loop gain: the duty codes are updated only on every DCC_DIV-th word, all
// eight together, so the duty loop is DCC_DIV (8) times slower than the phase
// loop, which it relies on to place the complementary rising edges.
// Interface: clk = CK_MUX1/4, valid from the deserializer, rst_n asynchronous
// active low resets the codes to mid-scale (no correction). Codes saturate at
// 0 and at full scale. The 1:8 bandwidth ratio and the falling-edge-only action
// follow the document; updating all codes at once is this design's choice.
module dcc_dlf #(
  parameter int unsigned DUTY_W  = 6,
  parameter int unsigned DCC_DIV = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   valid,
  input  logic [7:0]             err,
  output logic [7:0][DUTY_W-1:0] c_duty
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned       DIV_W    = (DCC_DIV > 1) ? $clog2(DCC_DIV) : 1;
  localparam logic [DUTY_W-1:0] DUTY_MAX = '1;

  logic [DIV_W-1:0] div_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0;
      for (int k = 0; k < 8; k++) c_duty[k] <= DUTY_W'(2 ** (DUTY_W - 1));
    end else if (valid) begin
      if (div_cnt == DIV_W'(DCC_DIV - 1)) begin
        div_cnt <= '0;
        for (int k = 0; k < 8; k++) begin
          if (err[k] && c_duty[k] != '0)             c_duty[k] <= c_duty[k] - 1'b1;
          else if (!err[k] && c_duty[k] != DUTY_MAX) c_duty[k] <= c_duty[k] + 1'b1;
        end
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
    end
  end
endmodule
