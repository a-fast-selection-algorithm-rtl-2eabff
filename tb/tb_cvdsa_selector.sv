// Self-checking testbench of cvdsa_selector.
//
// Runs the 8-SM, 4-bit worked example (select the 5 highest of
// 9,5,6,10,12,13,3,1: SMs 5,4,3,0,2 in three passes with branches 1, 3, 2),
// then random runs with 4-bit voltages (many equal values, so every branch
// and the equal-voltage pick happen) over random arm sizes, m and current
// direction. The reference is a plain ordering of the SMs by voltage, ties
// broken by the lower SM index, which is the order the selector resolves
// ties in. Also checks the cycle count of every run against the pass lengths
// the reference predicts, and the worst case (all voltages equal):
// 1 + N + VW*(N+3) + N + 4 cycles.
module tb_cvdsa_selector;
  import cvdsa_pkg::*;

  localparam int unsigned N  = 48;
  localparam int unsigned VW = 4;
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned CW = $clog2(N + 1);
  localparam int unsigned LW = $clog2(VW);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  logic [CW-1:0] num_sm = '0;
  logic [CW-1:0] m_ins = '0;
  logic          sel_low = 1'b0;
  logic          busy;
  logic          cv_valid = 1'b0;
  logic [VW-1:0] cv_data = '0;
  logic          cv_ready;
  logic          res_valid;
  logic [IW-1:0] res_idx;
  logic          res_insert;
  logic          done;
  logic          br_valid;
  branch_e       br_code;
  logic [LW-1:0] br_bit;
  logic [LW:0]   passes;

  cvdsa_selector #(.N_SM(N), .VW(VW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int br_seen [4];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [VW-1:0] volt [N];
  bit            got  [N];
  bit            want [N];
  branch_e       brs  [$];
  int            cycles;

  always @(posedge clk) if (br_valid) begin
    brs.push_back(br_code);
    br_seen[br_code]++;
  end

  // reference: rank by voltage (higher first, or lower first), ties by index
  function automatic bit ranks_ahead(int a, int b, bit low);
    if (volt[a] != volt[b]) return low ? (volt[a] < volt[b]) : (volt[a] > volt[b]);
    return a < b;
  endfunction

  // reference pass lengths of the division, to predict the cycle count
  function automatic int predicted_cycles(int n, int m, bit low);
    int cand [$];
    int total;
    for (int i = 0; i < n; i++) cand.push_back(i);
    total = 1 + n + n + 4;
    for (int b = VW - 1; b >= 0; b--) begin
      int big [$];
      int sml [$];
      total += cand.size() + 3;
      foreach (cand[k]) begin
        if (volt[cand[k]][b] ^ low) big.push_back(cand[k]);
        else                        sml.push_back(cand[k]);
      end
      if (m == big.size()) break;
      if (m > big.size()) begin m -= big.size(); cand = sml; end
      else cand = big;
    end
    return total;
  endfunction

  task automatic run(input int n, input int m, input bit low, input string name);
    int exp_m;
    int nsel;
    int next_idx;
    exp_m = (m > n) ? n : m;
    brs.delete();
    for (int i = 0; i < N; i++) got[i] = 0;
    // reference selection
    for (int i = 0; i < n; i++) begin
      int rank = 0;
      for (int j = 0; j < n; j++) if (j != i && ranks_ahead(j, i, low)) rank++;
      want[i] = (rank < exp_m);
    end
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
          cv_valid = 1'b1; cv_data = volt[i];
          #1 acc = cv_ready;
          @(negedge clk);
          if (acc) i++;
        end
        cv_valid = 1'b0;
      end
      begin
        nsel = 0; next_idx = 0;
        while (!done) begin
          @(posedge clk);
          cycles++;
          if (res_valid) begin
            if (res_idx != IW'(next_idx)) begin
              failures++;
              $display("FAIL %s: result order %0d expected %0d", name, res_idx, next_idx);
            end
            next_idx++;
            got[res_idx] = res_insert;
            if (res_insert) nsel++;
          end
        end
      end
    join
    check(next_idx == n, $sformatf("%s: %0d results for %0d SMs", name, next_idx, n));
    check(nsel == exp_m, $sformatf("%s: %0d selected, expected %0d", name, nsel, exp_m));
    for (int i = 0; i < n; i++)
      check(got[i] == want[i], $sformatf("%s: SM %0d insert=%0d expected %0d (v=%0d)",
                                          name, i, got[i], want[i], volt[i]));
    check(cycles == predicted_cycles(n, exp_m, low),
          $sformatf("%s: %0d cycles, expected %0d", name, cycles, predicted_cycles(n, exp_m, low)));
    check(!busy, {name, ": busy after done"});
  endtask

  initial begin
    static int ex [8] = '{9, 5, 6, 10, 12, 13, 3, 1};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // worked example: 8 SMs, 4 bits, the 5 highest
    foreach (ex[i]) volt[i] = VW'(ex[i]);
    run(8, 5, 1'b0, "example");
    check(passes == 3, $sformatf("example: %0d passes, expected 3", passes));
    check(brs.size() == 3 && brs[0] == BR_TAKE && brs[1] == BR_KEEP && brs[2] == BR_END,
          "example: branch sequence is not 1, 3, 2");

    // worst case: all voltages equal, every pass sees every SM
    for (int i = 0; i < N; i++) volt[i] = 4'ha;
    run(N, 17, 1'b0, "equal");
    check(cycles == 1 + N + VW * (N + 3) + N + 4, $sformatf("equal: %0d cycles", cycles));
    check(int'(passes) == VW, "equal: passes");
    run(N, 30, 1'b1, "equal-low");

    // edge cases
    for (int i = 0; i < N; i++) volt[i] = VW'($urandom);
    run(N, 0, 1'b0, "m=0");
    run(N, N, 1'b1, "m=N");
    run(N, N + 5, 1'b0, "m>N");
    run(1, 1, 1'b0, "single");

    // random runs
    for (int t = 0; t < 150; t++) begin
      automatic int n = 1 + int'($urandom_range(N - 1));
      automatic int m = int'($urandom_range(n));
      for (int i = 0; i < N; i++) volt[i] = VW'($urandom);
      run(n, m, 1'($urandom), $sformatf("random %0d", t));
    end

    check(br_seen[BR_TAKE] > 0 && br_seen[BR_KEEP] > 0 && br_seen[BR_END] > 0,
          "not every branch happened");
    $display("branches: 1=%0d 2=%0d 3=%0d", br_seen[BR_TAKE], br_seen[BR_END], br_seen[BR_KEEP]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
