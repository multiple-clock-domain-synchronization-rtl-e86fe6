// Buffer cell: storage for one word of the distributed FIFO.
//
// The cell is loaded through pass gates opened by the ENABLE pulse of its FIFO
// control cell, so it is written here as a level-sensitive latch: transparent
// while enable is high, holding while it is low. Enable is a short self-timed
// pulse, and the next stage cannot load this word until its own enable fires
// several gate delays after this one has closed, so the latch is safe where a
// flip-flop would also be.
//
// Interface: d (word from the previous stage or the sender latch), enable
// (local clock from the control cell), q (stored word). rst_n clears the cell
// asynchronously.
//
// Following the reference: the pass-gate load under ENABLE. Own choice: the
// reset value of zero.
//
// The latch is intended: it is the buffer cell of the reference circuit. When
// this cell is elaborated under the behavioural control cell, a linter may say
// it found no latch, because the enable pulse then comes from a delay model.
module buffer_cell #(
  parameter int unsigned DATA_W = mcd_sync_pkg::DATA_W
) (
  input  logic              rst_n,
  input  logic              enable,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] q
);
  timeunit 1ps;
  timeprecision 1ps;

  always_latch begin
    if (!rst_n)      q = '0;
    else if (enable) q = d;
  end
endmodule
