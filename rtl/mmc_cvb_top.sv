// Capacitor-voltage-balancing controller of a three-phase modular multilevel
// converter (six arms: upper and lower arm of phases a, b and c).
//
// Every arm has its own chain, all six running in parallel:
//   nlc           arm voltage reference -> number of SMs to insert, n
//   cvdsa_selector picks the n SMs with the lowest capacitor voltage when the
//                 arm current charges the capacitors (positive current), or
//                 the n with the highest when it discharges them
//   sm_pulse_gen  applies the selection to the SMs' gate signals at once
// The outer controllers that produce the arm voltage references (output
// power and circulating current control), the ADCs that sample the
// capacitor voltages and arm currents, and the power stage itself lie
// outside: their signals are ports here.
//
// Arm numbering: arm = 2*phase + j, phase a=0, b=1, c=2; j = 0 upper, 1 lower.
//
// Timing of one control period: a one-cycle start pulse samples u_ref and the
// sign of each arm current. One cycle later each arm's selector is started
// with its insertion index and takes the arm's capacitor voltages on its
// sample stream (cv_valid/cv_data, cv_ready; num_sm per arm, SM 0 first).
// When an arm's selection is complete its gates switch and done pulses. With
// a gap-free stream and all voltages equal (the slowest case) an arm takes
// 2 + N + VW*(N+3) + N + 4 cycles from start to its new gates; for 1024 SMs
// and 12-bit samples that is 14,378 cycles, 71.9 us at 200 MHz.
// start is ignored by an arm that is still busy with the previous period.
module mmc_cvb_top #(
  parameter int unsigned N_SM = 1024,  // SMs per arm
  parameter int unsigned VW   = 12,    // bits per capacitor voltage sample
  parameter int unsigned UW   = 24,    // width of the arm voltage references
  parameter int unsigned FW   = 24,    // fractional bits of uc_inv
  localparam int unsigned N_ARM = 6,
  localparam int unsigned CW  = $clog2(N_SM + 1),
  localparam int unsigned LW  = (VW > 1) ? $clog2(VW) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // control period
  input  logic                 start,
  input  logic [CW-1:0]        num_sm,              // SMs in each arm (0: N_SM)
  input  logic [FW-1:0]        uc_inv,              // 2^FW / nominal SM voltage in LSBs
  input  logic signed [UW-1:0] u_ref     [N_ARM],   // arm voltage references
  input  logic                 i_arm_pos [N_ARM],   // arm current is positive
  // sampled capacitor voltages, one stream per arm
  input  logic                 cv_valid  [N_ARM],
  input  logic [VW-1:0]        cv_data   [N_ARM],
  output logic                 cv_ready  [N_ARM],
  // SM gate signals
  output logic [N_SM-1:0]      sm_insert [N_ARM],
  output logic [N_SM-1:0]      gate_t1   [N_ARM],
  output logic [N_SM-1:0]      gate_t2   [N_ARM],
  // status
  output logic [CW-1:0]        n_ins     [N_ARM],   // insertion index of the period
  output logic [CW-1:0]        n_inserted[N_ARM],   // SMs inserted by the gates
  output logic [LW:0]          passes    [N_ARM],   // division passes of the last run
  output logic                 busy      [N_ARM],
  output logic                 done      [N_ARM]
);

  localparam int unsigned IW = (N_SM > 1) ? $clog2(N_SM) : 1;

  for (genvar k = 0; k < N_ARM; k++) begin : g_arm
    logic                n_valid;
    logic                sel_low_q;
    logic                res_valid;
    logic [IW-1:0]       res_idx;
    logic                res_insert;
    logic                sel_done;

    nlc #(.N_SM(N_SM), .UW(UW), .FW(FW)) u_nlc (
      .clk, .rst_n,
      .en      (start && !busy[k]),
      .u_ref   (u_ref[k]),
      .uc_inv,
      .n_ins   (n_ins[k]),
      .n_valid
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                  sel_low_q <= 1'b0;
      else if (start && !busy[k])  sel_low_q <= i_arm_pos[k];
    end

    cvdsa_selector #(.N_SM(N_SM), .VW(VW)) u_sel (
      .clk, .rst_n,
      .start    (n_valid),
      .num_sm,
      .m_ins    (n_ins[k]),
      .sel_low  (sel_low_q),
      .busy     (busy[k]),
      .cv_valid (cv_valid[k]),
      .cv_data  (cv_data[k]),
      .cv_ready (cv_ready[k]),
      .res_valid,
      .res_idx,
      .res_insert,
      .done     (sel_done),
      .br_valid (),
      .br_code  (),
      .br_bit   (),
      .passes   (passes[k])
    );

    sm_pulse_gen #(.N_SM(N_SM)) u_pulse (
      .clk, .rst_n,
      .res_valid,
      .res_idx,
      .res_insert,
      .done       (sel_done),
      .sm_insert  (sm_insert[k]),
      .gate_t1    (gate_t1[k]),
      .gate_t2    (gate_t2[k]),
      .n_inserted (n_inserted[k]),
      .update     (done[k])
    );
  end

endmodule
