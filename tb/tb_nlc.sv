// Self-checking testbench of nlc: random arm voltage references and nominal
// SM voltages; the expected index round(u_ref / U_c), clamped to 0 .. N, is
// computed in real arithmetic from the same reciprocal. Also checks the
// one-cycle latency and the clamps at both ends.
module tb_nlc;
  localparam int unsigned N  = 200;
  localparam int unsigned UW = 24;
  localparam int unsigned FW = 24;
  localparam int unsigned CW = $clog2(N + 1);

  logic                 clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [UW-1:0] u_ref = '0;
  logic [FW-1:0]        uc_inv = '0;
  logic [CW-1:0]        n_ins;
  logic                 n_valid;

  nlc #(.N_SM(N), .UW(UW), .FW(FW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one(input int u, input int uc);
    real q;
    int  want;
    uc_inv = FW'((64'd1 << FW) / uc);
    u_ref  = UW'(u);
    q    = real'(u) * real'(uc_inv) / real'(64'd1 << FW);
    want = (u < 0) ? 0 : int'($floor(q + 0.5));
    if (want > int'(N)) want = N;
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    check(n_valid, "n_valid not one cycle after en");
    check(int'(n_ins) == want, $sformatf("u=%0d uc=%0d: n=%0d expected %0d", u, uc, n_ins, want));
    @(negedge clk);
    check(!n_valid, "n_valid longer than one cycle");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    one(0, 2000);
    one(-500, 2000);
    one(2000 * 300, 2000);        // above N: clamp
    one(2000 * 37 + 999, 2000);   // just below half a level
    one(2000 * 37 + 1000, 2000);  // half a level rounds up
    for (int t = 0; t < 300; t++) begin
      automatic int uc = 1000 + int'($urandom_range(3000));
      automatic int u  = int'($urandom_range(uc * (N + 4))) - 100;
      one(u, uc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
