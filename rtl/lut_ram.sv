// lut_ram: the memory of one cascade cell LUT_i.
//
// A simple dual-port RAM as found in FPGA block RAM: a synchronous read port
// used by lookups and a write port used by the update host, so that the
// table can be rewritten while lookups continue. rd_data is registered:
// the word at rd_addr appears one clock after rd_en. When both ports touch
// the same word in the same clock the read returns the old word
// (read-first). The contents are not reset; the host loads every word a
// lookup can reach before lookups start.
//
// Depth 2^ADDR_W and width DATA_W follow the cell-size formula of the
// cascade, (r_i + a_i) * 2^(k + r_{i+1}); they are set by the enclosing cell.
module lut_ram #(
  parameter int unsigned ADDR_W = 14,
  parameter int unsigned DATA_W = 20
) (
  input  logic              clk,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_data,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wr_data
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

endmodule
