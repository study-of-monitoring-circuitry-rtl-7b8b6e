`timescale 1ns / 1ps
// tb_select_sync: checks the latency of the counter_select synchroniser.
// A change of sel must appear at sel_sync exactly at the second RO rising
// edge after the first controller edge that samples it, and not before.
module tb_select_sync;

  logic ctrl_clk = 1'b0, ro_clk = 1'b0;
  logic sel = 1'b0;
  logic sel_sync;
  int   checks = 0, failures = 0;

  select_sync dut (.ctrl_clk, .ro_clk, .sel, .sel_sync);

  always #10   ctrl_clk = ~ctrl_clk;   // 50 MHz
  always #20.5 ro_clk   = ~ro_clk;     // about 24.4 MHz

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic v);
    int ro_edges;
    @(negedge ctrl_clk);
    sel = v;
    @(posedge ctrl_clk);
    ro_edges = 0;
    // before the second RO edge the output must still hold the old value
    @(posedge ro_clk);
    #0.1;
    checks++;
    if (sel_sync !== ~v) begin failures++; $display("too early at value %b", v); end
    @(posedge ro_clk);
    #0.1;
    checks++;
    if (sel_sync !== v) begin failures++; $display("not passed at value %b", v); end
  endtask

  initial begin
    repeat (5) @(posedge ro_clk);
    checks++;
    if (sel_sync !== 1'b0) failures++;
    for (int i = 0; i < 40; i++) begin
      step(1'b1);
      repeat ($urandom % 7) @(posedge ctrl_clk);
      #($urandom % 17);
      step(1'b0);
      repeat ($urandom % 7) @(posedge ctrl_clk);
      #($urandom % 13);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
