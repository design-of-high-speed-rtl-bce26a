// octa_clk_src - testbench clock source: eight phases of a PERIOD_PS clock.
// Phase k rises at k*PERIOD/8 + skew_fs[k] and stays high for
// PERIOD/2 + dcerr_fs[k]. Skews and duty errors are set by the testbench at any
// time; they model the skew-programming cells of a test chip. Skews must stay
// within +-20 ps (every phase carries a fixed 20 ps offset).
module octa_clk_src #(
  parameter real PERIOD_PS = 125.0
) (
  input  logic        run,
  output logic [7:0]  ck
);
  timeunit 1ps; timeprecision 1fs;

  int skew_fs  [8];
  int dcerr_fs [8];

  initial begin
    ck = '0;
    for (int k = 0; k < 8; k++) begin
      skew_fs[k]  = 0;
      dcerr_fs[k] = 0;
    end
  end

  for (genvar k = 0; k < 8; k++) begin : g_ph
    initial begin
      #(PERIOD_PS * real'(k) / 8.0 + 100.0);
      forever begin
        automatic real hi = PERIOD_PS / 2.0 + real'(dcerr_fs[k]) / 1000.0;
        automatic real sk = 20.0 + real'(skew_fs[k]) / 1000.0;
        if (!run) begin
          #(PERIOD_PS);
        end else begin
          #(sk) ck[k] = 1'b1;
          #(hi) ck[k] = 1'b0;
          #(PERIOD_PS - hi - sk);
        end
      end
    end
  end
endmodule
