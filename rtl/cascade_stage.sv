// cascade_stage: one cell of the LUT cascade with its adder.
//
// The cell looks up the word at {x_digit, rail_in}: x_digit is the super
// variable X_i (K key bits) and rail_in names the current node of the
// edge-valued decision diagram. The word holds the rails of the child node
// reached by the edge x_digit (rail_out) and that edge's weight. The weight
// is added to the running sum by a weight_adder.
//
// RIN_W and ROUT_W are the numbers of rails this cell really uses on its
// input and output (at most RAIL_W, the width of the ports; unused upper
// port bits are ignored on input and zero on output). The first cell has
// no rails coming in (the diagram has one root), RIN_W = 0, so its memory
// has 2^K words. The last cell has no rails going out (all its edges go to
// the terminal node), ROUT_W = 0, so its words hold only the weight. The
// memory of a cell thus holds (ROUT_W + W_W) * 2^(K + RIN_W) bits.
//
// Timing: x_digit and rail_in are sampled with valid_in at clock c;
// rail_out and valid_out are ready after clock c+1; sum_in must be
// presented one clock after x_digit (at c+1) and sum_out is ready after
// clock c+2. This lets cell i+1 take rail_out and sum_out of cell i
// directly, with its own key digit delayed by one more clock.
//
// Update port: when wr_en is high the word for node wr_node and edge
// wr_digit is set to {wr_rail, wr_weight}; only the low RIN_W bits of
// wr_node and the low ROUT_W bits of wr_rail are used.
module cascade_stage #(
  parameter int unsigned K        = 4,
  parameter int unsigned RAIL_W   = 10,
  parameter int unsigned W_W      = 10,
  parameter int unsigned RIN_W    = RAIL_W,
  parameter int unsigned ROUT_W   = RAIL_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup path
  input  logic              valid_in,
  input  logic [K-1:0]      x_digit,
  input  logic [RAIL_W-1:0] rail_in,
  input  logic [W_W-1:0]    sum_in,
  output logic              valid_out,
  output logic [RAIL_W-1:0] rail_out,
  output logic [W_W-1:0]    sum_out,
  // update write port
  input  logic              wr_en,
  input  logic [K-1:0]      wr_digit,
  input  logic [RAIL_W-1:0] wr_node,
  input  logic [RAIL_W-1:0] wr_rail,
  input  logic [W_W-1:0]    wr_weight
);

  localparam int unsigned ADDR_W = K + RIN_W;
  localparam int unsigned DATA_W = ROUT_W + W_W;

  logic [ADDR_W-1:0] rd_addr, wr_addr;
  logic [DATA_W-1:0] rd_data, wr_data;
  logic              valid_q;

  generate
    if (RIN_W > 0) begin : g_rin
      assign rd_addr = {x_digit, rail_in[RIN_W-1:0]};
      assign wr_addr = {wr_digit, wr_node[RIN_W-1:0]};
    end else begin : g_no_rin
      assign rd_addr = x_digit;
      assign wr_addr = wr_digit;
    end
    if (ROUT_W > 0) begin : g_rout
      assign wr_data  = {wr_rail[ROUT_W-1:0], wr_weight};
      assign rail_out = RAIL_W'(rd_data[DATA_W-1 -: ROUT_W]);
    end else begin : g_no_rout
      assign wr_data  = wr_weight;
      assign rail_out = '0;
    end
  endgenerate

  lut_ram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_lut (
    .clk    (clk),
    .rd_en  (valid_in),
    .rd_addr(rd_addr),
    .rd_data(rd_data),
    .wr_en  (wr_en),
    .wr_addr(wr_addr),
    .wr_data(wr_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= 1'b0;
    else        valid_q <= valid_in;
  end
  assign valid_out = valid_q;

  weight_adder #(.W(W_W)) u_add (
    .clk    (clk),
    .en     (valid_q),
    .sum_in (sum_in),
    .weight (rd_data[W_W-1:0]),
    .sum_out(sum_out)
  );

  // A cell cannot use more rails than its ports carry.
  initial begin
    assert (RIN_W <= RAIL_W && ROUT_W <= RAIL_W)
      else $error("cascade_stage: RIN_W/ROUT_W exceed RAIL_W");
  end

endmodule
