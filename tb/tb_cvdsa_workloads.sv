// Worst-case timing of cvdsa_selector at its default size (1024 SMs, 12-bit
// samples) for arms of 128, 256, 512 and 1024 SMs, run on one instance
// through num_sm.
//
// For each arm size: one run with all capacitor voltages equal, the slowest
// case, in which every one of the 12 passes sees every SM; the cycle count
// must be 1 + N + 12*(N+3) + N + 4 (store, passes, read-out), and the time at
// a 200 MHz clock is printed. At 1024 SMs it must be within 5% of 70 us, and
// at 256 SMs within 5% of 17.7 us, the execution times measured for the
// algorithm on an FPGA at that clock. A second run per size with random
// voltages checks the selection against a sorted reference.
module tb_cvdsa_workloads;
  import cvdsa_pkg::*;

  localparam int unsigned N  = 1024;
  localparam int unsigned VW = 12;
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned CW = $clog2(N + 1);
  localparam int unsigned LW = $clog2(VW);
  localparam real         T_CLK_US = 0.005;   // 200 MHz

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [CW-1:0] num_sm = '0, m_ins = '0;
  logic          sel_low = 1'b0, busy;
  logic          cv_valid = 1'b0, cv_ready;
  logic [VW-1:0] cv_data = '0;
  logic          res_valid, res_insert, done, br_valid;
  logic [IW-1:0] res_idx;
  branch_e       br_code;
  logic [LW-1:0] br_bit;
  logic [LW:0]   passes;

  cvdsa_selector dut (.*);

  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int volt [N];
  bit got [N];
  int cycles;

  task automatic run(input int n, input int m, input bit low);
    @(negedge clk);
    start = 1'b1; num_sm = CW'(n); m_ins = CW'(m); sel_low = low;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    fork
      begin
        int i = 0;
        while (i < n) begin
          bit acc;
          cv_valid = 1'b1; cv_data = VW'(volt[i]);
          #1 acc = cv_ready;
          @(negedge clk);
          if (acc) i++;
        end
        cv_valid = 1'b0;
      end
      begin
        while (!done) begin
          @(posedge clk);
          cycles++;
          if (res_valid) got[res_idx] = res_insert;
        end
      end
    join
  endtask

  // reference: the m-th largest (or smallest) voltage and how many SMs
  // lie strictly beyond it
  task automatic check_sel(input int n, input int m, input bit low, input string name);
    int sorted [$];
    int thr, beyond, at_thr, nsel;
    bit ok = 1;
    for (int i = 0; i < n; i++) sorted.push_back(volt[i]);
    if (low) sorted.sort(); else sorted.rsort();
    thr = sorted[m - 1];
    beyond = 0; nsel = 0;
    for (int i = 0; i < n; i++) if (low ? volt[i] < thr : volt[i] > thr) beyond++;
    at_thr = 0;
    for (int i = 0; i < n; i++) begin
      bit w;
      if (low ? volt[i] < thr : volt[i] > thr) w = 1;
      else if (volt[i] == thr) begin w = (at_thr < m - beyond); at_thr++; end
      else w = 0;
      if (got[i] != w) ok = 0;
      if (got[i]) nsel++;
    end
    check(ok && nsel == m, $sformatf("%s: selection differs from reference (%0d selected)", name, nsel));
  endtask

  initial begin
    int sizes [4] = '{128, 256, 512, 1024};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (sizes[s]) begin
      automatic int n = sizes[s];
      automatic int expect_c = 1 + n + VW * (n + 3) + n + 4;
      real us;
      for (int i = 0; i < n; i++) volt[i] = 2048;
      run(n, n / 2 + 1, 1'b0);
      us = real'(cycles) * T_CLK_US;
      $display("N=%0d worst case: %0d cycles = %0.2f us at 200 MHz", n, cycles, us);
      check(cycles == expect_c, $sformatf("N=%0d: %0d cycles, expected %0d", n, cycles, expect_c));
      check(int'(passes) == VW, "worst case did not take every pass");
      check_sel(n, n / 2 + 1, 1'b0, "equal");
      if (n == 1024) check(us > 66.5 && us < 73.5, "1024 SMs: not within 5% of 70 us");
      if (n == 256)  check(us > 16.8 && us < 18.6, "256 SMs: not within 5% of 17.7 us");

      for (int i = 0; i < n; i++) volt[i] = 1900 + int'($urandom_range(300));
      begin
        automatic int m = 1 + int'($urandom_range(n - 1));
        automatic bit lo = 1'($urandom);
        run(n, m, lo);
        check_sel(n, m, lo, $sformatf("random N=%0d", n));
        check(cycles < expect_c, "random run not faster than the worst case");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
