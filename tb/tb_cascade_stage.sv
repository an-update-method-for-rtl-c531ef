// tb_cascade_stage: checks four kinds of cascade cell (first: no rails in;
// middle with full rails; middle using fewer rails than its ports carry;
// last: no rails out) against reference tables.
// All words are written through the update port, then random lookups run
// with random running sums and interleaved rewrites. After the clock that
// samples a lookup, valid_out and rail_out must show it; sum_in is given
// one clock later and sum_out must equal sum_in + weight (mod 2^W) one
// clock after that. Outputs hold while no lookup is valid.
`timescale 1ns/1ps
module tb_cascade_stage;
  localparam int unsigned K  = 2;
  localparam int unsigned RW = 3;
  localparam int unsigned WW = 5;
  localparam int unsigned NC = 4;   // 0 first, 1 middle, 2 narrow, 3 last
  localparam int unsigned RIN  [NC] = '{0, RW, 2, RW};
  localparam int unsigned ROUT [NC] = '{RW, RW, 2, 0};

  logic          clk = 1'b0;
  logic          rst_n;
  logic          valid_in;
  logic [K-1:0]  x_digit;
  logic [RW-1:0] rail_in;
  logic [WW-1:0] sum_in;
  logic          wr_en;
  logic [K-1:0]  wr_digit;
  logic [RW-1:0] wr_node, wr_rail;
  logic [WW-1:0] wr_weight;
  logic [NC-1:0] wr_sel;

  logic          valid_out [NC];
  logic [RW-1:0] rail_out  [NC];
  logic [WW-1:0] sum_out   [NC];

  for (genvar c = 0; c < NC; c++) begin : g_dut
    cascade_stage #(.K(K), .RAIL_W(RW), .W_W(WW),
                    .RIN_W(RIN[c]), .ROUT_W(ROUT[c])) dut (
      .clk(clk), .rst_n(rst_n),
      .valid_in(valid_in), .x_digit(x_digit), .rail_in(rail_in), .sum_in(sum_in),
      .valid_out(valid_out[c]), .rail_out(rail_out[c]), .sum_out(sum_out[c]),
      .wr_en(wr_en && wr_sel[c]), .wr_digit(wr_digit), .wr_node(wr_node),
      .wr_rail(wr_rail), .wr_weight(wr_weight));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [RW-1:0] m_rail   [NC][2**K][2**RW];
  logic [WW-1:0] m_weight [NC][2**K][2**RW];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int node_of(int c, logic [RW-1:0] r);
    return int'(r) & ((1 << RIN[c]) - 1);
  endfunction

  int p_c, p_d, p_n;

  // drive a write; the reference tables change in apply_write()
  task automatic write_word(int c, int d, int n);
    wr_en = 1'b1; wr_sel = NC'(1) << c;
    wr_digit = K'(d); wr_node = RW'(n);
    wr_rail = RW'($urandom); wr_weight = WW'($urandom);
    p_c = c; p_d = d; p_n = n;
  endtask

  task automatic apply_write();
    // only the low RIN bits of the node and ROUT bits of the rails count
    for (int nn = 0; nn < 2**RW; nn++)
      if (node_of(p_c, RW'(nn)) == node_of(p_c, RW'(p_n))) begin
        m_rail[p_c][p_d][nn]   = RW'(int'(wr_rail) & ((1 << ROUT[p_c]) - 1));
        m_weight[p_c][p_d][nn] = wr_weight;
      end
  endtask

  initial begin
    logic [RW-1:0] e_rail [NC];
    logic [WW-1:0] e_w    [NC];
    logic [WW-1:0] e_sum  [NC];
    logic          v1, v2;
    rst_n = 1'b0; valid_in = 1'b0; x_digit = '0; rail_in = '0; sum_in = '0;
    wr_en = 1'b0; wr_sel = '0; wr_digit = '0; wr_node = '0; wr_rail = '0; wr_weight = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    for (int c = 0; c < NC; c++) if (valid_out[c] !== 1'b0) failures++;
    for (int c = 0; c < NC; c++)
      for (int d = 0; d < 2**K; d++)
        for (int n = 0; n < 2**RW; n++)
          if (n < (1 << RIN[c])) begin
            @(negedge clk);
            write_word(c, d, n);
            apply_write();
          end
    @(negedge clk);
    wr_en = 1'b0;
    v1 = 1'b0; v2 = 1'b0;
    for (int c = 0; c < NC; c++) begin e_rail[c] = rail_out[c]; e_sum[c] = sum_out[c]; e_w[c] = '0; end
    for (int i = 0; i < 3000; i++) begin
      // sum_in belongs to the lookup sampled at the last edge
      sum_in = WW'($urandom);
      if (v1) for (int c = 0; c < NC; c++) e_sum[c] = sum_in + e_w[c];
      // new lookup and maybe a rewrite
      valid_in = ($urandom_range(3, 0) != 0);
      x_digit  = K'($urandom);
      rail_in  = RW'($urandom);
      if ($urandom_range(7, 0) == 0) write_word($urandom_range(NC - 1, 0), $urandom_range(2**K - 1, 0), $urandom_range(2**RW - 1, 0));
      else wr_en = 1'b0;
      @(posedge clk);
      v2 = v1;
      v1 = valid_in;
      if (valid_in)
        for (int c = 0; c < NC; c++) begin
          e_rail[c] = m_rail[c][x_digit][node_of(c, rail_in)];
          e_w[c]    = m_weight[c][x_digit][node_of(c, rail_in)];
        end
      // a write in the same clock lands after the read (read-first)
      if (wr_en) apply_write();
      @(negedge clk);
      for (int c = 0; c < NC; c++) begin
        checks += 3;
        if (valid_out[c] !== v1) failures++;
        if (rail_out[c] !== e_rail[c]) begin
          failures++;
          if (failures < 10) $display("FAIL: cell %0d rail %0d expected %0d", c, rail_out[c], e_rail[c]);
        end
        if (sum_out[c] !== e_sum[c]) begin
          failures++;
          if (failures < 10) $display("FAIL: cell %0d sum %0d expected %0d", c, sum_out[c], e_sum[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
