// Binary-division selector for capacitor voltage balancing of one MMC arm.
//
// Given the sampled capacitor voltages of the arm's SMs and the number m of
// SMs to insert, the selector finds the m SMs with the highest voltage
// (sel_low = 0) or the lowest voltage (sel_low = 1) without sorting. It looks
// at one voltage bit per pass, from the MSB down. Each pass splits the
// remaining candidates into a larger group (bit = 1, or bit = 0 when the
// lowest are wanted) and a smaller group and compares m with the size of the
// larger group (branches of cvdsa_pkg):
//   m >  size: the whole larger group is selected; continue in the smaller
//              group with m - size.
//   m == size: the whole larger group is selected; done.
//   m <  size: the smaller group is dropped; continue in the larger group.
// If a pass on the LSB still leaves more candidates than wanted, they all
// have the same voltage and the first ones in SM order are taken.
//
// Memories (sdp_ram, meant for block RAM): the voltage array (N_SM x VW), two
// index arrays (N_SM x IW) used in turn as source and destination of a pass,
// and a state array (N_SM x (LW+1)). A pass reads an SM index from the
// source array, then that SM's voltage, then writes the index into the
// destination array: larger-group entries from address 0 upwards,
// smaller-group entries from address N_SM-1 downwards. This read-read-write
// chain is a three-stage pipeline that takes one candidate per clock.
//
// Rather than writing the selected SMs to a result array during a pass, the
// selector records for every SM the level (bit) of the last pass that saw it
// and the group it fell into, and keeps the branch taken at every level. An
// SM is selected if it fell into the larger group at a level whose branch
// selected that group, or it is one of the equal-voltage candidates left
// after the LSB pass and the pick quota is not yet used up. The output phase
// reads the state array once in SM order and produces the result stream.
// These last two points, the state array and the region layout of the index
// arrays, are this design's own choices; the splitting rule, the branches,
// the memory set and the one-candidate-per-clock pass follow the algorithm.
//
// Interface and timing:
//   start (one cycle, while !busy) latches num_sm (active SMs, 0 or more than
//   N_SM means N_SM), m_ins (clamped to num_sm) and sel_low.
//   Store phase: num_sm voltages in SM order on cv_data, one per cycle when
//   cv_valid && cv_ready.
//   Division passes: a pass over L candidates takes L + 3 cycles; br_valid
//   pulses at the end of each pass with its branch in br_code and its bit in
//   br_bit. At most VW passes.
//   Output phase: res_valid/res_idx/res_insert for SM 0 .. num_sm-1, one per
//   cycle, then a one-cycle done pulse.
//   Worst case (all voltages equal) with a gap-free stream:
//   1 + N + VW*(N+3) + N + 4 cycles from start to done.
module cvdsa_selector
  import cvdsa_pkg::*;
#(
  parameter int unsigned N_SM = 1024,  // SMs per arm (largest case evaluated)
  parameter int unsigned VW   = 12,    // bits per capacitor voltage sample
  localparam int unsigned IW  = (N_SM > 1) ? $clog2(N_SM) : 1,
  localparam int unsigned CW  = $clog2(N_SM + 1),
  localparam int unsigned LW  = (VW > 1) ? $clog2(VW) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // command
  input  logic          start,
  input  logic [CW-1:0] num_sm,
  input  logic [CW-1:0] m_ins,
  input  logic          sel_low,
  output logic          busy,
  // sampled capacitor voltages
  input  logic          cv_valid,
  input  logic [VW-1:0] cv_data,
  output logic          cv_ready,
  // selection result
  output logic          res_valid,
  output logic [IW-1:0] res_idx,
  output logic          res_insert,
  output logic          done,
  // pass status
  output logic          br_valid,
  output branch_e       br_code,
  output logic [LW-1:0] br_bit,
  output logic [LW:0]   passes
);

  typedef enum logic [2:0] {S_IDLE, S_STORE, S_PASS, S_OUT, S_DONE} state_e;

  localparam logic [IW-1:0] TOP_ADDR = IW'(N_SM - 1);

  state_e         state;
  logic [CW-1:0]  n_act;        // active SMs of this run
  logic           low_q;        // select lowest voltages
  logic [CW-1:0]  m_rem;        // SMs still to select
  logic [LW-1:0]  bit_q;        // bit examined by the current pass
  logic           src_q;        // index array read by the current pass
  logic           reg_small;    // current candidates sit in the upper region
  logic [CW-1:0]  len_q;        // candidates of the current pass
  logic [CW-1:0]  iss_cnt;      // candidates issued in this pass / SMs stored / SMs read out
  logic [CW-1:0]  nb_q, ns_q;   // larger / smaller group sizes so far
  branch_e        dec_q [VW];   // branch taken at each level
  logic           pick_en;      // LSB pass left equal candidates to pick from
  logic           pick_big;     // the group they are in
  logic [CW-1:0]  pick_rem;     // how many of them still to take

  // pipeline registers of a pass
  logic           p1_v, p2_v;
  logic [IW-1:0]  p2_idx;
  // pipeline register of the output phase
  logic           o1_v;
  logic [IW-1:0]  o1_idx;

  // memory ports
  logic                 vr_we;
  logic [IW-1:0]        vr_waddr;
  logic [VW-1:0]        vr_rdata;
  logic [1:0]           ix_we;
  logic [IW-1:0]        ix_waddr [2];
  logic [IW-1:0]        ix_wdata [2];
  logic [IW-1:0]        ix_raddr;
  logic [IW-1:0]        ix_rdata [2];
  logic                 ix_re;
  logic                 st_we;
  logic [LW:0]          st_wdata;
  logic                 st_re;
  logic [LW:0]          st_rdata;

  logic [IW-1:0] p1_idx;     // stage 1: index read from the source array
  logic          p2_big;     // stage 2: candidate falls into the larger group
  logic          pass_end;   // last candidate written, decide this cycle
  logic          cv_take;
  logic [CW-1:0] n_start;    // active SMs requested by start
  branch_e       br_next;    // branch of the pass that ends this cycle

  // ---------------------------------------------------------------- memories
  sdp_ram #(.WIDTH(VW), .DEPTH(N_SM)) u_volt (
    .clk, .we(vr_we), .waddr(vr_waddr), .wdata(cv_data),
    .re(p1_v), .raddr(p1_idx), .rdata(vr_rdata)
  );

  for (genvar a = 0; a < 2; a++) begin : g_index
    sdp_ram #(.WIDTH(IW), .DEPTH(N_SM)) u_idx (
      .clk, .we(ix_we[a]), .waddr(ix_waddr[a]), .wdata(ix_wdata[a]),
      .re(ix_re && (src_q == 1'(a))), .raddr(ix_raddr), .rdata(ix_rdata[a])
    );
  end

  sdp_ram #(.WIDTH(LW + 1), .DEPTH(N_SM)) u_state (
    .clk, .we(st_we), .waddr(p2_idx), .wdata(st_wdata),
    .re(st_re), .raddr(iss_cnt[IW-1:0]), .rdata(st_rdata)
  );

  // ------------------------------------------------------------ pass datapath

  assign p1_idx   = ix_rdata[src_q];
  assign p2_big   = vr_rdata[bit_q] ^ low_q;
  assign pass_end = (state == S_PASS) && (iss_cnt == len_q) && !p1_v && !p2_v;
  assign cv_ready = (state == S_STORE);
  assign cv_take  = cv_valid && cv_ready;
  assign n_start  = (num_sm == '0 || num_sm > CW'(N_SM)) ? CW'(N_SM) : num_sm;

  always_comb begin
    if (m_rem == nb_q)     br_next = BR_END;
    else if (m_rem > nb_q) br_next = BR_TAKE;
    else                   br_next = BR_KEEP;
  end

  // stage 0: read the next candidate index of the current region
  assign ix_re    = (state == S_PASS) && (iss_cnt != len_q);
  assign ix_raddr = reg_small ? TOP_ADDR - iss_cnt[IW-1:0] : iss_cnt[IW-1:0];

  // stage 2 writes / store-phase writes
  always_comb begin
    vr_we    = cv_take;
    vr_waddr = iss_cnt[IW-1:0];
    ix_we    = '0;
    for (int a = 0; a < 2; a++) begin
      ix_waddr[a] = iss_cnt[IW-1:0];
      ix_wdata[a] = iss_cnt[IW-1:0];
    end
    if (cv_take) begin
      ix_we[0] = 1'b1;                   // identity list for the first pass
    end else if (p2_v) begin
      ix_we[~src_q]    = 1'b1;
      ix_waddr[~src_q] = p2_big ? nb_q[IW-1:0] : TOP_ADDR - ns_q[IW-1:0];
      ix_wdata[~src_q] = p2_idx;
    end
    st_we    = p2_v;
    st_wdata = {bit_q, p2_big};
    st_re    = (state == S_OUT) && (iss_cnt != n_act);
  end

  // ------------------------------------------------------------ output decision
  logic          o_lvl_take;
  logic          o_pick;
  logic [LW-1:0] o_lvl;
  logic          o_big;

  always_comb begin
    o_lvl      = st_rdata[LW:1];
    o_big      = st_rdata[0];
    o_lvl_take = o_big && (dec_q[o_lvl] == BR_TAKE || dec_q[o_lvl] == BR_END);
    o_pick     = pick_en && (o_lvl == '0) && (o_big == pick_big) && (pick_rem != '0);
  end

  // ------------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      n_act      <= '0;
      low_q      <= 1'b0;
      m_rem      <= '0;
      bit_q      <= '0;
      src_q      <= 1'b0;
      reg_small  <= 1'b0;
      len_q      <= '0;
      iss_cnt    <= '0;
      nb_q       <= '0;
      ns_q       <= '0;
      pick_en    <= 1'b0;
      pick_big   <= 1'b0;
      pick_rem   <= '0;
      p1_v       <= 1'b0;
      p2_v       <= 1'b0;
      p2_idx     <= '0;
      o1_v       <= 1'b0;
      o1_idx     <= '0;
      res_valid  <= 1'b0;
      res_idx    <= '0;
      res_insert <= 1'b0;
      done       <= 1'b0;
      br_valid   <= 1'b0;
      br_code    <= BR_NONE;
      br_bit     <= '0;
      passes     <= '0;
      for (int l = 0; l < VW; l++) dec_q[l] <= BR_NONE;
    end else begin
      done      <= 1'b0;
      br_valid  <= 1'b0;
      res_valid <= 1'b0;

      // pass pipeline, stages 1 and 2
      p1_v   <= ix_re;
      p2_v   <= p1_v;
      p2_idx <= p1_idx;
      if (p2_v) begin
        if (p2_big) nb_q <= nb_q + 1'b1;
        else        ns_q <= ns_q + 1'b1;
      end

      unique case (state)
        S_IDLE: begin
          if (start) begin
            n_act   <= n_start;
            m_rem   <= (m_ins > n_start) ? n_start : m_ins;
            low_q   <= sel_low;
            iss_cnt <= '0;
            passes  <= '0;
            pick_en <= 1'b0;
            for (int l = 0; l < VW; l++) dec_q[l] <= BR_NONE;
            state   <= S_STORE;
          end
        end

        S_STORE: begin
          if (cv_take) begin
            iss_cnt <= iss_cnt + 1'b1;
            if (iss_cnt == n_act - 1'b1) begin
              // first pass: all active SMs, MSB
              iss_cnt   <= '0;
              len_q     <= n_act;
              reg_small <= 1'b0;
              src_q     <= 1'b0;
              bit_q     <= LW'(VW - 1);
              nb_q      <= '0;
              ns_q      <= '0;
              state     <= S_PASS;
            end
          end
        end

        S_PASS: begin
          if (ix_re) iss_cnt <= iss_cnt + 1'b1;
          if (pass_end) begin
            dec_q[bit_q] <= br_next;
            br_valid     <= 1'b1;
            br_code      <= br_next;
            br_bit       <= bit_q;
            passes       <= passes + 1'b1;
            // next pass works on the group just written
            src_q        <= ~src_q;
            iss_cnt      <= '0;
            nb_q         <= '0;
            ns_q         <= '0;
            if (br_next == BR_TAKE) begin
              m_rem     <= m_rem - nb_q;
              len_q     <= ns_q;
              reg_small <= 1'b1;
            end else begin
              len_q     <= nb_q;
              reg_small <= 1'b0;
            end
            if (br_next == BR_END) begin
              state <= S_OUT;
            end else if (bit_q == '0) begin
              // LSB done: the remaining candidates are all equal
              pick_en  <= 1'b1;
              pick_big <= (br_next == BR_KEEP);
              pick_rem <= (br_next == BR_TAKE) ? m_rem - nb_q : m_rem;
              state    <= S_OUT;
            end else begin
              bit_q <= bit_q - 1'b1;
            end
          end
        end

        S_OUT: begin
          o1_v   <= st_re;
          o1_idx <= iss_cnt[IW-1:0];
          if (st_re) iss_cnt <= iss_cnt + 1'b1;
          if (o1_v) begin
            res_valid  <= 1'b1;
            res_idx    <= o1_idx;
            res_insert <= o_lvl_take || o_pick;
            if (!o_lvl_take && o_pick) pick_rem <= pick_rem - 1'b1;
          end
          if (!st_re && !o1_v) state <= S_DONE;
        end

        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // a pass never starts on an empty group and never asks for more SMs than it has
  property p_quota;
    @(posedge clk) disable iff (!rst_n) (state == S_PASS && iss_cnt == '0) |-> (m_rem <= len_q);
  endproperty
  a_quota: assert property (p_quota);

endmodule
