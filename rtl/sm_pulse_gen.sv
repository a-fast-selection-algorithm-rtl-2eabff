// Switching-pulse generator of one MMC arm.
//
// Turns the selector's result stream into the gate signals of the arm's
// half-bridge SMs. Results (SM index, insert flag) are collected in a shadow
// register while the selector streams them out; on the selector's done pulse
// the shadow register is copied to the gate outputs in one step, so that all
// SMs of the arm change state at the same clock edge and a half-finished
// result never reaches the power stage. The shadow register is cleared at the
// same time, so an SM that a later run does not report stays bypassed.
//
// An inserted SM has its upper switch T1 on and its lower switch T2 off; a
// bypassed SM the reverse. After reset every SM is bypassed. Dead time
// between T1 and T2 is left to the gate drivers. The simultaneous update, the
// reset state and the plain complementary gating are this design's choices.
//
// Timing: one result per cycle in; gates and n_inserted change on the clock
// edge after done, together with a one-cycle update pulse.
module sm_pulse_gen #(
  parameter int unsigned N_SM = 1024,
  localparam int unsigned IW  = (N_SM > 1) ? $clog2(N_SM) : 1,
  localparam int unsigned CW  = $clog2(N_SM + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            res_valid,
  input  logic [IW-1:0]   res_idx,
  input  logic            res_insert,
  input  logic            done,
  output logic [N_SM-1:0] sm_insert,   // 1: SM inserted
  output logic [N_SM-1:0] gate_t1,     // upper switch of each half bridge
  output logic [N_SM-1:0] gate_t2,     // lower switch of each half bridge
  output logic [CW-1:0]   n_inserted,  // SMs inserted by the current gates
  output logic            update
);

  logic [N_SM-1:0] shadow;
  logic [CW-1:0]   cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shadow     <= '0;
      cnt        <= '0;
      sm_insert  <= '0;
      n_inserted <= '0;
      update     <= 1'b0;
    end else begin
      update <= done;
      if (done) begin
        sm_insert  <= shadow;
        n_inserted <= cnt;
        shadow     <= '0;
        cnt        <= '0;
      end else if (res_valid) begin
        shadow[res_idx] <= res_insert;
        if (res_insert) cnt <= cnt + 1'b1;
      end
    end
  end

  assign gate_t1 = sm_insert;
  assign gate_t2 = ~sm_insert;

endmodule
