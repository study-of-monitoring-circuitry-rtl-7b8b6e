`timescale 1ns / 1ps
// tb_bram_ctrl: random AXI4-Lite halfword and word writes and reads against a
// byte-array model, with random bready/rready back-pressure; out-of-range
// accesses must answer SLVERR and leave memory unchanged.
module tb_bram_ctrl;
  import pvmap_pkg::*;

  localparam int BYTES = 256;

  logic      clk = 1'b0, rst_n = 1'b0;
  axil_req_t req;
  axil_rsp_t rsp;
  int        checks = 0, failures = 0;
  logic [7:0] model [BYTES];
  bit         known [BYTES];

  bram_ctrl #(.MEM_BYTES(BYTES)) dut (.clk, .rst_n, .s_axi_req(req), .s_axi_rsp(rsp));

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(logic [31:0] a, logic [31:0] d, logic [3:0] strb, output logic [1:0] resp);
    @(negedge clk);
    req.awaddr = a; req.awvalid = 1; req.wdata = d; req.wstrb = strb; req.wvalid = 1;
    do @(posedge clk); while (!rsp.awready);
    @(negedge clk);
    req.awvalid = 0; req.wvalid = 0;
    req.bready = 0;
    repeat ($urandom % 3) @(negedge clk);
    req.bready = 1;
    while (!rsp.bvalid) @(negedge clk);
    resp = rsp.bresp;
    @(posedge clk);
    #1 req.bready = 0;
  endtask

  task automatic read(logic [31:0] a, output logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    req.araddr = a; req.arvalid = 1;
    do @(posedge clk); while (!rsp.arready);
    @(negedge clk);
    req.arvalid = 0;
    repeat ($urandom % 3) @(negedge clk);
    req.rready = 1;
    while (!rsp.rvalid) @(negedge clk);
    d = rsp.rdata; resp = rsp.rresp;
    @(posedge clk);
    #1 req.rready = 0;
  endtask

  initial begin
    logic [1:0]  resp;
    logic [31:0] d;
    req = '0;
    for (int i = 0; i < BYTES; i++) known[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      logic [31:0] a, wd;
      logic [3:0] strb;
      a  = {24'b0, 8'($urandom)} & ~32'h1;
      wd = $urandom;
      if ($urandom % 2) strb = a[1] ? 4'b1100 : 4'b0011;
      else begin a[1] = 1'b0; strb = 4'b1111; end
      write(a, wd, strb, resp);
      checks++;
      if (resp != 2'b00) failures++;
      for (int b = 0; b < 4; b++)
        if (strb[b]) begin model[{a[7:2], 2'(b)}] = wd[8*b +: 8]; known[{a[7:2], 2'(b)}] = 1; end
      a = {24'b0, 8'($urandom)} & ~32'h3;
      read(a, d, resp);
      checks++;
      if (resp != 2'b00) failures++;
      for (int b = 0; b < 4; b++)
        if (known[a + b] && d[8*b +: 8] !== model[a + b]) begin
          failures++;
          $display("read %h byte %0d: %h expected %h", a, b, d[8*b +: 8], model[a + b]);
        end
    end
    // out of range
    write(32'h0000_0100, 32'hdead_beef, 4'hf, resp);
    checks++;
    if (resp != 2'b10) begin failures++; $display("no SLVERR on write"); end
    read(32'h0000_0104, d, resp);
    checks++;
    if (resp != 2'b10) begin failures++; $display("no SLVERR on read"); end
    read(32'h0000_0000, d, resp);
    checks++;
    for (int b = 0; b < 4; b++)
      if (known[b] && d[8*b +: 8] !== model[b]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
