// Self-checking testbench of sm_pulse_gen: streams random results for a
// random number of SMs and checks that the gates keep their old values until
// done, then all change at once to the new selection (T1 = insert,
// T2 = not insert), that n_inserted counts the inserted SMs, that update
// pulses once, and that SMs a run does not report fall back to bypassed.
module tb_sm_pulse_gen;
  localparam int unsigned N  = 40;
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned CW = $clog2(N + 1);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          res_valid = 1'b0, res_insert = 1'b0, done = 1'b0;
  logic [IW-1:0] res_idx = '0;
  logic [N-1:0]  sm_insert, gate_t1, gate_t2;
  logic [CW-1:0] n_inserted;
  logic          update;

  sm_pulse_gen #(.N_SM(N)) dut (.*);

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

  initial begin
    logic [N-1:0] prev, want;
    int cnt;
    repeat (2) @(negedge clk);
    check(sm_insert == '0 && gate_t2 == '1, "reset state is not all bypassed");
    rst_n = 1'b1;
    prev = '0;
    for (int t = 0; t < 60; t++) begin
      automatic int n = 1 + int'($urandom_range(N - 1));
      want = '0; cnt = 0;
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        res_valid = 1'b1; res_idx = IW'(i); res_insert = 1'($urandom);
        want[i] = res_insert;
        if (res_insert) cnt++;
      end
      @(negedge clk);
      res_valid = 1'b0;
      check(sm_insert == prev, "gates changed before done");
      done = 1'b1;
      @(negedge clk);
      done = 1'b0;
      check(update, "no update pulse");
      check(sm_insert == want, $sformatf("run %0d: gates %h expected %h", t, sm_insert, want));
      check(gate_t1 == want && gate_t2 == ~want, "T1/T2 not complementary to the selection");
      check(int'(n_inserted) == cnt, $sformatf("n_inserted %0d expected %0d", n_inserted, cnt));
      @(negedge clk);
      check(!update, "update longer than one cycle");
      prev = want;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
