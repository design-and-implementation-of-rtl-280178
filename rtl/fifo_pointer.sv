// fifo_pointer: counter-based read or write pointer of the FIFO.
//
// How it works. An N-bit synchronous counter holds the address of the next
// word to access; it replaces the ring shift register of a conventional FIFO
// pointer, so only N registers and N address lines toggle instead of one flop
// per word. An N-to-2^N decoder turns the address into one select line per
// word, and each select line is ANDed with the access window pulse (WP for the
// write pointer, RP for the read pointer) to form the word line, so a word
// line is high exactly while the window controller keeps the pulse open.
//
// Timing. CEN = 1 clears the counter to 0 asynchronously. A clock edge with
// the enable low (WEN or REN, active low) starts an access, which the window
// controller turns into a pulse; the counter steps by one when that pulse
// closes, so the address is stable for the whole word-line pulse and the first
// word accessed after reset is word 0. The document states that the counter
// steps on the clock edge; stepping at the end of the window is this design's
// choice so that the decoder never changes under an open word line.
//
// Interface: pulse is the window pulse, addr the current address, wl the
// gated one-hot word lines, sel the ungated decoder output.
module fifo_pointer #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned N    = $clog2(WORDS)
) (
  input  logic             cen,
  input  logic             pulse,
  output logic [N-1:0]     addr,
  output logic [WORDS-1:0] sel,
  output logic [WORDS-1:0] wl
);
  timeunit 1ns; timeprecision 1ps;

  always_ff @(negedge pulse or posedge cen) begin
    if (cen)                       addr <= '0;
    else if (addr == N'(WORDS-1))  addr <= '0;
    else                           addr <= addr + 1'b1;
  end

  always_comb begin
    sel = '0;
    sel[addr] = 1'b1;
  end

  assign wl = sel & {WORDS{pulse}};
endmodule
