// End-to-end testbench of mmc_cvb_top at reduced size (24 SMs per arm, 5-bit
// voltage samples, so that equal voltages are common).
//
// Closes the loop around a simple arm model: every control period each arm
// gets a voltage reference and an arm-current sign, streams its capacitor
// voltages into the controller (with random gaps on the stream), and when
// the new gates arrive every inserted SM's capacitor is charged (positive
// current) or discharged (negative current) by a random amount. Checks per
// period and arm:
//   - the insertion index against round(u_ref / U_c) clamped to 0 .. N,
//   - the inserted set against a reference ranking (lowest voltages first
//     for positive current, highest first otherwise; ties to the lower SM
//     index), and T1/T2 against it,
//   - n_inserted, and that gates never change before done.
// Counts the mechanisms: branches 1, 2 and 3 of the division, runs that
// reach the LSB with equal voltages left, both current directions, both
// NLC clamps, a start ignored while busy, and a run on fewer SMs than the
// arm holds. A mechanism that never happens counts as a failure. At the end
// checks that the voltage spread of every arm stayed bounded, i.e. the
// balancing works.
module tb_mmc_cvb_top;
  import cvdsa_pkg::*;

  localparam int unsigned N     = 24;
  localparam int unsigned VW    = 5;
  localparam int unsigned UW    = 24;
  localparam int unsigned FW    = 24;
  localparam int unsigned NA    = 6;
  localparam int unsigned CW    = $clog2(N + 1);
  localparam int unsigned LW    = $clog2(VW);
  localparam int          UC    = 16;        // nominal SM voltage, LSBs
  localparam int          PERIODS = 60;

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

  mmc_cvb_top #(.N_SM(N), .VW(VW), .UW(UW), .FW(FW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_br [4];
  int n_lsb_pick, n_pos, n_neg, n_clamp_hi, n_clamp_lo, n_ignored, n_short;

  for (genvar k = 0; k < NA; k++) begin : g_mon
    always @(posedge clk) if (dut.g_arm[k].u_sel.br_valid) begin
      n_br[dut.g_arm[k].u_sel.br_code]++;
      if (dut.g_arm[k].u_sel.br_bit == '0 && dut.g_arm[k].u_sel.br_code != BR_END) n_lsb_pick++;
    end
  end

  int            volt [NA][N];
  int            n_act;
  int            want_n [NA];
  bit            low [NA];

  function automatic bit ranks_ahead(int k, int a, int b, bit lo);
    if (volt[k][a] != volt[k][b]) return lo ? (volt[k][a] < volt[k][b]) : (volt[k][a] > volt[k][b]);
    return a < b;
  endfunction

  task automatic stream(input int k);
    int i = 0;
    while (i < n_act) begin
      bit acc;
      cv_valid[k] = ($urandom_range(3) != 0);
      cv_data[k]  = VW'(volt[k][i]);
      #1 acc = cv_ready[k] && cv_valid[k];
      @(negedge clk);
      if (acc) i++;
    end
    cv_valid[k] = 1'b0;
  endtask

  task automatic finish_arm(input int k);
    logic [N-1:0] before_gates;
    logic [N-1:0] want;
    int m;
    before_gates = sm_insert[k];
    while (!done[k]) begin
      @(negedge clk);
      if (!done[k] && sm_insert[k] != before_gates) begin
        failures++;
        $display("FAIL: arm %0d gates changed before done", k);
      end
    end
    m = (want_n[k] > n_act) ? n_act : want_n[k];
    want = '0;
    for (int i = 0; i < n_act; i++) begin
      int rank = 0;
      for (int j = 0; j < n_act; j++) if (j != i && ranks_ahead(k, j, i, low[k])) rank++;
      want[i] = (rank < m);
    end
    check(sm_insert[k] == want, $sformatf("arm %0d: inserted %h expected %h", k, sm_insert[k], want));
    check(gate_t1[k] == want && gate_t2[k] == ~want, $sformatf("arm %0d: T1/T2", k));
    check(int'(n_inserted[k]) == m, $sformatf("arm %0d: n_inserted %0d expected %0d", k, n_inserted[k], m));
    // arm model: inserted capacitors carry the arm current
    for (int i = 0; i < n_act; i++) if (want[i]) begin
      int d = 1 + int'($urandom_range(2));
      volt[k][i] += low[k] ? d : -d;
      if (volt[k][i] > 2**VW - 1) volt[k][i] = 2**VW - 1;
      if (volt[k][i] < 0) volt[k][i] = 0;
    end
  endtask

  initial begin
    int spread0 [NA];
    uc_inv = FW'((64'd1 << FW) / UC);
    foreach (u_ref[k]) begin
      u_ref[k] = '0; i_arm_pos[k] = 1'b0; cv_valid[k] = 1'b0; cv_data[k] = '0;
      for (int i = 0; i < N; i++) volt[k][i] = 8 + int'($urandom_range(16));
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    for (int p = 0; p < PERIODS; p++) begin
      n_act = (p % 7 == 3) ? N - 5 : N;
      if (n_act < N) n_short++;
      num_sm = CW'(n_act);
      if (p == 5) for (int i = 0; i < N; i++) volt[0][i] = 20;   // all equal
      for (int k = 0; k < NA; k++) begin
        automatic int r = int'($urandom_range(9));
        real q;
        int target;
        // references: mostly around the middle, sometimes outside 0 .. N
        if (r == 0)      target = -int'($urandom_range(40));
        else if (r == 1) target = UC * (N + 3);
        else             target = UC * (N / 2) + int'($urandom_range(UC * 8)) - UC * 4;
        u_ref[k] = UW'(target);
        q = real'(target) * real'(uc_inv) / real'(64'd1 << FW);
        want_n[k] = (target < 0) ? 0 : int'($floor(q + 0.5));
        if (want_n[k] > int'(N)) begin want_n[k] = N; n_clamp_hi++; end
        if (target < 0) n_clamp_lo++;
        low[k] = 1'($urandom);
        i_arm_pos[k] = low[k];
        if (low[k]) n_pos++; else n_neg++;
      end
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      for (int k = 0; k < NA; k++)
        check(int'(n_ins[k]) == want_n[k], $sformatf("arm %0d: n %0d expected %0d", k, n_ins[k], want_n[k]));
      // a second start while the arms are busy must be ignored
      if (p % 5 == 2) begin
        automatic int keep_n = int'(n_ins[0]);
        @(negedge clk);
        u_ref[0] = '0;
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        check(int'(n_ins[0]) == keep_n && busy[0], "start while busy was not ignored");
        n_ignored++;
      end
      for (int k = 0; k < NA; k++) begin
        fork
          automatic int kk = k;
          begin stream(kk); finish_arm(kk); end
        join_none
      end
      wait fork;
      if (p == 0) foreach (spread0[k]) begin
        automatic int mx = 0, mn = 1 << VW;
        for (int i = 0; i < N; i++) begin
          if (volt[k][i] > mx) mx = volt[k][i];
          if (volt[k][i] < mn) mn = volt[k][i];
        end
        spread0[k] = mx - mn;
      end
      @(negedge clk);
    end

    // balancing: no arm's spread may grow past its starting spread + 3
    for (int k = 0; k < NA; k++) begin
      automatic int mx = 0, mn = 1 << VW;
      for (int i = 0; i < N; i++) begin
        if (volt[k][i] > mx) mx = volt[k][i];
        if (volt[k][i] < mn) mn = volt[k][i];
      end
      check(mx - mn <= spread0[k] + 3, $sformatf("arm %0d spread %0d (start %0d)", k, mx - mn, spread0[k]));
    end

    $display("branch1=%0d branch2=%0d branch3=%0d lsb_pick=%0d pos=%0d neg=%0d clamp_hi=%0d clamp_lo=%0d ignored=%0d short=%0d",
             n_br[BR_TAKE], n_br[BR_END], n_br[BR_KEEP], n_lsb_pick, n_pos, n_neg,
             n_clamp_hi, n_clamp_lo, n_ignored, n_short);
    check(n_br[BR_TAKE] > 0, "branch 1 never happened");
    check(n_br[BR_END] > 0, "branch 2 never happened");
    check(n_br[BR_KEEP] > 0, "branch 3 never happened");
    check(n_lsb_pick > 0, "no run reached the LSB with equal voltages left");
    check(n_pos > 0 && n_neg > 0, "one current direction never happened");
    check(n_clamp_hi > 0 && n_clamp_lo > 0, "an NLC clamp never happened");
    check(n_ignored > 0, "no start while busy");
    check(n_short > 0, "no run on fewer SMs than the arm holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
