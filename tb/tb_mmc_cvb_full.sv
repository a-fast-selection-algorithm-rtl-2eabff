// One complete control period of mmc_cvb_top at its default size: six arms
// of 1024 SMs with 12-bit capacitor voltage samples.
//
// Arm 0 has all capacitor voltages equal (the slowest case: every pass sees
// every SM) and is checked for its start-to-gates latency,
// 2 + N + 12*(N+3) + N + 4 cycles, about 72 us at 200 MHz. The other arms
// get random voltages of different spreads, different references and both
// current directions. For each arm the insertion index, the inserted set
// (against a sorted reference, ties to the lower SM index), T1/T2 and
// n_inserted are checked.
module tb_mmc_cvb_full;
  localparam int unsigned N   = 1024;
  localparam int unsigned VW  = 12;
  localparam int unsigned UW  = 24;
  localparam int unsigned FW  = 24;
  localparam int unsigned NA  = 6;
  localparam int unsigned CW  = $clog2(N + 1);
  localparam int unsigned LW  = $clog2(VW);
  localparam int          UC  = 2048;      // nominal SM voltage, LSBs

  logic                 clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [CW-1:0]        num_sm = '0;
  logic [FW-1:0]        uc_inv;
  logic signed [UW-1:0] u_ref     [NA];
  logic                 i_arm_pos [NA];
  logic                 cv_valid  [NA];
  logic [VW-1:0]        cv_data   [NA];
  logic                 cv_ready  [NA];
  logic [N-1:0]         sm_insert [NA];
  logic [N-1:0]         gate_t1   [NA];
  logic [N-1:0]         gate_t2   [NA];
  logic [CW-1:0]        n_ins     [NA];
  logic [CW-1:0]        n_inserted[NA];
  logic [LW:0]          passes    [NA];
  logic                 busy      [NA];
  logic                 done      [NA];

  mmc_cvb_top dut (.*);

  always #2.5 clk = ~clk;   // 200 MHz

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int volt [NA][N];
  int want_n [NA];
  int lat [NA];

  task automatic stream(input int k);
    int i = 0;
    while (i < N) begin
      bit acc;
      cv_valid[k] = 1'b1;
      cv_data[k]  = VW'(volt[k][i]);
      #1 acc = cv_ready[k];
      @(negedge clk);
      if (acc) i++;
    end
    cv_valid[k] = 1'b0;
  endtask

  task automatic check_arm(input int k);
    int sorted [$];
    int m, thr, beyond, at_thr;
    bit lo;
    logic [N-1:0] want;
    lo = i_arm_pos[k];
    m  = want_n[k];
    want = '0;
    if (m > 0) begin
      for (int i = 0; i < N; i++) sorted.push_back(volt[k][i]);
      if (lo) sorted.sort(); else sorted.rsort();
      thr = sorted[m - 1];
      beyond = 0;
      for (int i = 0; i < N; i++) if (lo ? volt[k][i] < thr : volt[k][i] > thr) beyond++;
      at_thr = 0;
      for (int i = 0; i < N; i++) begin
        if (lo ? volt[k][i] < thr : volt[k][i] > thr) want[i] = 1'b1;
        else if (volt[k][i] == thr) begin want[i] = (at_thr < m - beyond); at_thr++; end
      end
    end
    check(sm_insert[k] == want, $sformatf("arm %0d: inserted set differs from reference", k));
    check(gate_t1[k] == want && gate_t2[k] == ~want, $sformatf("arm %0d: T1/T2", k));
    check(int'(n_inserted[k]) == m, $sformatf("arm %0d: n_inserted %0d expected %0d", k, n_inserted[k], m));
  endtask

  initial begin
    int spreads [NA] = '{0, 4095, 400, 40, 8, 2000};
    int levels  [NA] = '{512, 300, 700, 1, 1023, 1024};
    uc_inv = FW'((64'd1 << FW) / UC);
    for (int k = 0; k < NA; k++) begin
      for (int i = 0; i < N; i++)
        volt[k][i] = (spreads[k] == 4095) ? int'($urandom_range(4095))
                                          : 2048 - spreads[k] / 2 + int'($urandom_range(spreads[k]));
      u_ref[k]     = UW'(levels[k] * UC);
      want_n[k]    = levels[k];
      i_arm_pos[k] = 1'(k % 2);
      cv_valid[k]  = 1'b0;
      cv_data[k]   = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    num_sm = '0;            // every arm uses all N SMs
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int k = 0; k < NA; k++)
      check(int'(n_ins[k]) == want_n[k], $sformatf("arm %0d: n %0d expected %0d", k, n_ins[k], want_n[k]));
    for (int k = 0; k < NA; k++) begin
      fork
        automatic int kk = k;
        stream(kk);
        begin
          lat[kk] = 1;
          while (!done[kk]) begin @(negedge clk); lat[kk]++; end
          check_arm(kk);
        end
      join_none
    end
    wait fork;
    $display("arm 0 (all voltages equal): %0d cycles from start to gates = %0.2f us at 200 MHz",
             lat[0], real'(lat[0]) * 0.005);
    check(lat[0] == 2 + N + VW * (N + 3) + N + 4,
          $sformatf("arm 0 latency %0d, expected %0d", lat[0], 2 + N + VW * (N + 3) + N + 4));
    check(int'(passes[0]) == VW, "arm 0 did not take every pass");
    for (int k = 1; k < NA; k++) check(lat[k] <= lat[0], $sformatf("arm %0d slower than the worst case", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
