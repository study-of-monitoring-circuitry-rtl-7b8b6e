`timescale 1ns / 1ps
// tb_srl32: checks the addressable shift register against a reference model:
// power-up INIT, shifting only with ce, load priority, tap and last-bit
// outputs at random addresses.
module tb_srl32;

  localparam logic [31:0] INIT = 32'h4000_0000;

  logic       clk = 1'b0;
  logic       ce, load, d;
  logic [4:0] addr;
  logic       q, q31;
  int         checks = 0, failures = 0;
  logic [31:0] model;

  srl32 #(.INIT(INIT)) dut (.clk, .ce, .load, .d, .addr, .q, .q31);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a < 32; a++) begin
      addr = 5'(a);
      #1;
      checks++;
      if (q !== model[a]) begin
        failures++;
        $display("mismatch addr %0d: q=%b expected %b", a, q, model[a]);
      end
    end
    checks++;
    if (q31 !== model[31]) failures++;
  endtask

  initial begin
    ce = 0; load = 0; d = 0; addr = 0;
    model = INIT;
    #2;
    check_all();
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      ce   = ($urandom % 3) != 0;
      load = ($urandom % 40) == 0;
      d    = $urandom % 2;
      @(posedge clk);
      if (load)    model = INIT;
      else if (ce) model = {model[30:0], d};
      #1;
      addr = 5'($urandom);
      #1;
      checks++;
      if (q !== model[addr]) begin
        failures++;
        $display("step %0d: q=%b expected %b", i, q, model[addr]);
      end
      if (i % 50 == 0) begin
        @(negedge clk);
        ce = 1'b0;
        load = 1'b0;
        check_all();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
