// Self-checking testbench of sdp_ram: fills a small RAM with random words,
// reads them back in random order against a model, checks that a read
// returns its word on the next cycle and holds it while re is low, and that a
// read of the address being written returns the old word.
module tb_sdp_ram;
  localparam int unsigned W = 10;
  localparam int unsigned D = 40;
  localparam int unsigned AW = $clog2(D);

  logic          clk = 1'b0;
  logic          we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0]  wdata = '0, rdata;

  sdp_ram #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] model [D];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    @(negedge clk);
    for (int a = 0; a < D; a++) begin
      we = 1'b1; waddr = AW'(a); wdata = W'($urandom); model[a] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    for (int t = 0; t < 200; t++) begin
      automatic int a = int'($urandom_range(D - 1));
      re = 1'b1; raddr = AW'(a);
      @(negedge clk);
      re = 1'b0;
      check(rdata == model[a], $sformatf("read %0d: %h expected %h", a, rdata, model[a]));
      raddr = AW'($urandom_range(D - 1));
      @(negedge clk);
      check(rdata == model[a], "rdata not held while re is low");
    end
    // read and write of one address in the same cycle
    re = 1'b1; we = 1'b1; raddr = 5; waddr = 5; wdata = ~model[5];
    @(negedge clk);
    re = 1'b0; we = 1'b0;
    check(rdata == model[5], "read during write did not return the old word");
    model[5] = ~model[5];
    re = 1'b1;
    @(negedge clk);
    re = 1'b0;
    check(rdata == model[5], "written word not read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
