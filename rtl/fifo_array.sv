// fifo_array: the SRAM block of both FIFOs, WORDS words of DATA_W bits built
// from dual-port cells (10T in the 16 Kb FIFO, 9T in the DVS FIFO).
//
// How it works. Every word is a row of level-sensitive storage cells: while
// its write word line wwl[i] is high the row follows the write bit lines
// (wbl, driven by the write drivers), and it holds when wwl[i] falls. A word
// whose cell supply retain[i] is low keeps nothing: it reads as all zeros,
// which is how this model shows that a power-gated word has lost its data.
// The read port is single-ended: each read bit line starts precharged high
// and a selected cell holding 0 pulls it low, so rbl[j] is the stored bit of
// the word whose rwl is high, and all ones when no read word line is high.
//
// Interface. wwl/rwl are one-hot word lines from the pointers' decoders
// (already gated by the write/read window pulses). wbl is the 16-bit write
// data. rbl goes to the sense amplifiers. Timing: writes are transparent
// while the word line is high; reads are combinational.
//
// The dual-port organisation, single-ended bit lines and per-word supply
// follow the document; the "lost data reads as zero" convention is a
// modelling choice of this RTL.
module fifo_array #(
  parameter int unsigned WORDS  = 1024,
  parameter int unsigned DATA_W = 16
) (
  input  logic [WORDS-1:0]  wwl,
  input  logic [DATA_W-1:0] wbl,
  input  logic [WORDS-1:0]  rwl,
  input  logic [WORDS-1:0]  retain,
  output logic [DATA_W-1:0] rbl
);
  timeunit 1ns; timeprecision 1ps;

  logic [DATA_W-1:0] mem [WORDS];  // stored words, for observation

  for (genvar i = 0; i < WORDS; i++) begin : g_row
    logic [DATA_W-1:0] cells;
    always_latch begin
      if (!retain[i])   cells = '0;
      else if (wwl[i])  cells = wbl;
    end
    assign mem[i] = cells;
  end

  // Wired-AND read bit lines: a selected cell storing 0 discharges its line.
  // Column b sees, from every word, either "not selected" or its stored bit.
  for (genvar b = 0; b < DATA_W; b++) begin : g_col
    logic [WORDS-1:0] keep;
    for (genvar i = 0; i < WORDS; i++) begin : g_cell
      assign keep[i] = ~rwl[i] | mem[i][b];
    end
    assign rbl[b] = &keep;
  end
endmodule
