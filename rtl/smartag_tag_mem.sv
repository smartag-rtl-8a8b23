// smartag_tag_mem: storage of the SMARTag tag array.
//
// One row per cache set holds all four tag entries (valid, dirty, UPL,
// parity, 19 stored bits each; 96 bits), so a whole set is read at once, as
// the UPL multiplexer needs. Read is synchronous: rd_data shows the row
// addressed in the cycle before rd_en was sampled and holds until the next
// read. One write port; a write and a read of the same row in one cycle
// return the old row. The inj_* port XORs a mask into one row and stands for
// particle strikes in simulation; it is a test hook of this design, not part
// of the scheme. The contents are not reset: the controller clears them. The
// one-row-per-set organisation is this design's choice.
module smartag_tag_mem #(
  parameter int unsigned SETS  = 128,
  parameter int unsigned ROW_W = 96,
  localparam int unsigned IDX_W = $clog2(SETS)
) (
  input  logic             clk,
  input  logic             rd_en,
  input  logic [IDX_W-1:0] rd_addr,
  output logic [ROW_W-1:0] rd_data,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_addr,
  input  logic [ROW_W-1:0] wr_data,
  input  logic             inj_en,
  input  logic [IDX_W-1:0] inj_addr,
  input  logic [ROW_W-1:0] inj_mask
);

  logic [ROW_W-1:0] mem [SETS];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
    else if (inj_en) mem[inj_addr] <= mem[inj_addr] ^ inj_mask;
  end

endmodule
