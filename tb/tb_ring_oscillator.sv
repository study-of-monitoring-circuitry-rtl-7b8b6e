`timescale 1ns / 1ps
// tb_ring_oscillator: measures the period of each of the four RO types
// against the slow-corner frequencies 56.657224 (ro_high, ro_low),
// 24.38073 (ro_8_cc2_8_cc2) and 17.93014 MHz (ro_16_8_cc2), checks a
// +2% variation, and checks that the output is held low while en is low.
module tb_ring_oscillator;
  import pvmap_pkg::*;

  localparam int N = 5;
  logic         en = 1'b0;
  logic [N-1:0] ro;
  int           checks = 0, failures = 0;
  real          expect_mhz [N] = '{56.657224, 56.657224, 24.38073, 17.93014, 17.93014 / 1.02};

  ring_oscillator #(.RO_TYPE(RO_HIGH))        u0 (.en, .ro_out(ro[0]));
  ring_oscillator #(.RO_TYPE(RO_LOW))         u1 (.en, .ro_out(ro[1]));
  ring_oscillator #(.RO_TYPE(RO_8_CC2_8_CC2)) u2 (.en, .ro_out(ro[2]));
  ring_oscillator #(.RO_TYPE(RO_16_8_CC2))    u3 (.en, .ro_out(ro[3]));
  ring_oscillator #(.RO_TYPE(RO_16_8_CC2), .VARIATION_PPM(20000)) u4 (.en, .ro_out(ro[4]));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int   edges [N];
  realtime first [N], last [N];

  for (genvar g = 0; g < N; g++) begin : g_meas
    always @(posedge ro[g]) begin
      if (edges[g] == 0) first[g] = $realtime;
      last[g] = $realtime;
      edges[g]++;
    end
  end

  initial begin
    for (int i = 0; i < N; i++) edges[i] = 0;
    #1000;
    checks++;
    if (ro !== '0) begin failures++; $display("oscillating while disabled"); end
    en = 1'b1;
    #20us;
    en = 1'b0;
    #200;
    for (int i = 0; i < N; i++) begin
      real f;
      f = (edges[i] - 1) / ((last[i] - first[i]) / 1.0e3);  // MHz (ns time unit)
      checks++;
      if (edges[i] < 10 || f < expect_mhz[i] * 0.9995 || f > expect_mhz[i] * 1.0005) begin
        failures++;
        $display("RO %0d: %0d edges, %f MHz, expected %f", i, edges[i], f, expect_mhz[i]);
      end
    end
    for (int i = 0; i < N; i++) edges[i] = 0;
    #5us;
    checks++;
    if (ro !== '0 || edges[0] != 0) begin failures++; $display("not stopped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
