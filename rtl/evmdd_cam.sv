// evmdd_cam: CAM emulator for longest prefix match built as a LUT cascade
// that evaluates an edge-valued multi-valued decision diagram, EVMDD(k).
//
// The key of N_BITS bits is cut into u = ceil(N_BITS/K) super variables
// X_1..X_u of K bits, X_1 being the most significant (the start of the
// prefix; if K does not divide N_BITS the key is padded with zeros at the
// low end). Cell i (cascade_stage) takes X_i and the rails from cell i-1,
// which name a node of the diagram on level i, and returns the rails of the
// child node and the weight of the edge. The result is the sum of the u
// edge weights: the index of the longest stored prefix that matches the
// key, or 0 when none does. Which index each prefix has, and so the word in
// every cell, is decided by the host that builds the diagram.
//
// Lookups are fully pipelined: one key per clock may enter with in_valid,
// and its index leaves with out_valid LATENCY = u + 1 clocks later (one
// clock per cell for the memory read, one more for the last adder). The key
// digit of cell i is delayed i clocks so that it meets the rails of its
// own key.
//
// Updates: the host adds or deletes prefixes by rewriting cell words. One
// word is written per clock through the upd_* port (always accepted):
// cell upd_stage, node upd_node, edge upd_digit gets child rails upd_rail
// and edge weight upd_weight. Writes do not stall lookups; a lookup that
// overlaps a partly written update may see a mix of old and new words, so
// the host orders its writes (or accepts transient results) as it sees fit.
//
// Rails: between cell b-1 and cell b the cascade carries
// min(RAIL_W, K*b) rails (cam_pkg::rails_at), since level b of the diagram
// cannot have more than 2^(K*b) nodes, and RAIL_W = ceil(log2(p+1)) bounds
// it for a table of p prefixes. The port fields upd_node and upd_rail are
// RAIL_W wide; a cell uses only its own number of low bits.
//
// The cell structure, the adders on the weight rail, the rail widths
// ceil(log2(p+1)) and the update-by-rewriting-words scheme follow the
// published architecture; K = 4, the structural cap K*b on the early
// rails, the pipelining and the port protocol are this design's choices.
module evmdd_cam
  import cam_pkg::*;
#(
  parameter int unsigned N_BITS = N_BITS_DEF,
  parameter int unsigned K      = K_DEF,
  parameter int unsigned RAIL_W = RAIL_W_DEF,
  parameter int unsigned W_W    = W_W_DEF,
  // derived, not to be overridden
  parameter int unsigned U       = num_cells(N_BITS, K),
  parameter int unsigned SEL_W   = sel_width(U),
  parameter int unsigned LATENCY = U + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup
  input  logic              in_valid,
  input  logic [N_BITS-1:0] in_key,
  output logic              out_valid,
  output logic [W_W-1:0]    out_index,
  // update write port
  input  logic              upd_valid,
  input  logic [SEL_W-1:0]  upd_stage,
  input  logic [K-1:0]      upd_digit,
  input  logic [RAIL_W-1:0] upd_node,
  input  logic [RAIL_W-1:0] upd_rail,
  input  logic [W_W-1:0]    upd_weight
);

  localparam int unsigned PAD_W = U * K;

  logic [PAD_W-1:0] key_pad;
  assign key_pad = {in_key, {(PAD_W - N_BITS){1'b0}}};

  logic              valid_c [U+1];
  logic [RAIL_W-1:0] rail_c  [U+1];
  logic [W_W-1:0]    sum_c   [U+1];

  assign valid_c[0] = in_valid;
  assign rail_c[0]  = '0;
  assign sum_c[0]   = '0;

  for (genvar i = 0; i < U; i++) begin : g_cell
    // X_{i+1}, delayed i clocks to line up with its key's rails
    logic [K-1:0] digit_d [i+1];
    assign digit_d[0] = key_pad[PAD_W-1-i*K -: K];
    for (genvar d = 1; d <= i; d++) begin : g_dly
      always_ff @(posedge clk) digit_d[d] <= digit_d[d-1];
    end

    cascade_stage #(
      .K     (K),
      .RAIL_W(RAIL_W),
      .W_W   (W_W),
      .RIN_W (rails_at(i, K, RAIL_W, U)),
      .ROUT_W(rails_at(i + 1, K, RAIL_W, U))
    ) u_stage (
      .clk      (clk),
      .rst_n    (rst_n),
      .valid_in (valid_c[i]),
      .x_digit  (digit_d[i]),
      .rail_in  (rail_c[i]),
      .sum_in   (sum_c[i]),
      .valid_out(valid_c[i+1]),
      .rail_out (rail_c[i+1]),
      .sum_out  (sum_c[i+1]),
      .wr_en    (upd_valid && (upd_stage == SEL_W'(i))),
      .wr_digit (upd_digit),
      .wr_node  (upd_node),
      .wr_rail  (upd_rail),
      .wr_weight(upd_weight)
    );
  end

  // The last cell's sum is ready one clock after its valid_out.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= valid_c[U];
  end
  assign out_index = sum_c[U];

  // A write must name an existing cell.
  a_upd_stage: assert property (@(posedge clk) disable iff (!rst_n)
    upd_valid |-> (int'(upd_stage) < int'(U)));

endmodule
