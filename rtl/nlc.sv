// Nearest-level control (NLC) of one MMC arm.
//
// Converts the arm voltage reference into the insertion index: the number of
// SMs the arm has to insert so that the sum of their capacitor voltages is
// nearest to the reference, n = round(u_ref / U_c). The reference u_ref is in
// the LSBs of the capacitor-voltage samples (so that one SM at nominal
// voltage is U_c LSBs), signed; the divide by U_c is a multiply by its
// reciprocal uc_inv, given as an unsigned fraction with FW fractional bits
// (uc_inv = 2^FW / U_c). The result is rounded half up and clamped to
// 0 .. N_SM, so a negative reference inserts nothing and one above the arm's
// total inserts every SM.
//
// Only the block's place (arm voltage reference in, insertion index out) is
// given by the control scheme; the rounding rule, the reciprocal input and
// the number formats are this design's choices.
//
// Timing: u_ref is sampled when en is high; n_ins and n_valid follow one
// clock later (one multiply, registered).
module nlc #(
  parameter int unsigned N_SM = 1024,
  parameter int unsigned UW   = 24,   // width of the signed arm voltage reference
  parameter int unsigned FW   = 24,   // fractional bits of uc_inv
  localparam int unsigned CW  = $clog2(N_SM + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [UW-1:0] u_ref,
  input  logic [FW-1:0]       uc_inv,
  output logic [CW-1:0]       n_ins,
  output logic                n_valid
);

  localparam int unsigned PW = UW + FW;

  logic [PW-1:0] prod;      // |u_ref| * uc_inv, FW fractional bits
  logic [PW-1:0] rounded;   // integer part after rounding
  logic [CW-1:0] n_next;

  always_comb begin
    prod    = PW'(unsigned'(u_ref)) * PW'(uc_inv);
    rounded = (prod + (PW'(1) << (FW - 1))) >> FW;
    if (u_ref < 0)                    n_next = '0;
    else if (rounded > PW'(N_SM))     n_next = CW'(N_SM);
    else                              n_next = CW'(rounded);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_ins   <= '0;
      n_valid <= 1'b0;
    end else begin
      n_valid <= en;
      if (en) n_ins <= n_next;
    end
  end

endmodule
