// param_ram: on-chip parameter memory (one BlockRAM per use) for a layer.
//
// Each row holds ELEMS parameters of EW bits; a read returns a whole row so
// that every multiplier of every neuron unit gets its weight in the same
// cycle. Parameters are written one element at a time (element write enable),
// which is how the register block loads a trained model before inference.
//
// Interface and timing:
//   wr_en/wr_row/wr_elem/wr_data  write one element, visible on the next read
//   rd_en/rd_row                  synchronous read, rd_data valid one cycle
//                                 after rd_en and held until the next read
// The memory has no reset: its contents are undefined until loaded.
// Holding trained parameters in BlockRAM follows the source design; the row
// layout and the element write port are this design's choice.
module param_ram #(
  parameter int unsigned ROWS  = 10,
  parameter int unsigned ELEMS = 32,
  parameter int unsigned EW    = 21
) (
  input  logic                              clk,
  input  logic                              wr_en,
  input  logic [$clog2(ROWS)-1:0]           wr_row,
  input  logic [$clog2(ELEMS)-1:0]          wr_elem,
  input  logic [EW-1:0]                     wr_data,
  input  logic                              rd_en,
  input  logic [$clog2(ROWS)-1:0]           rd_row,
  output logic [ELEMS-1:0][EW-1:0]          rd_data
);

  logic [ELEMS-1:0][EW-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row][wr_elem] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_row];
  end

endmodule
