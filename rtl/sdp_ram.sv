// Simple dual-port RAM with one write port and one registered read port.
//
// The selector keeps all of its per-SM data in memories of this shape so that
// an FPGA maps them onto embedded block RAM instead of logic-cell registers:
// the capacitor-voltage array, the two index arrays and the per-SM state
// array. The write is synchronous; a read issued with re in one cycle returns
// the word in rdata on the next cycle and holds it until the next read. A read
// of the address being written in the same cycle returns the old word.
// Nothing is reset: every word is written before it is read.
//
// Defaults: 1024 words of 12 bits, the largest arm (1024 SMs) and the 12-bit
// voltage samples of the reference implementation.
module sdp_ram #(
  parameter int unsigned WIDTH = 12,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
