// tb_bgp_update_rate: update throughput at the default size.
//
// A table of 1023 random prefixes is loaded, then 200 updates are made,
// each replacing one stored prefix by a new one (a deletion and an
// addition). After each update only the changed words are written through
// the update port, one per clock, while unchecked lookups keep flowing;
// then 20 lookups are checked against a direct longest-prefix search.
// The testbench measures the clocks the port needs per update and checks
// that, at a 48 MHz clock, the port sustains 100,000 updates per second
// (at most 480 clocks per update), ten times the BGP peak of 10,000. The
// time the host needs to compute an update is not modelled.
`timescale 1ns/1ps
module tb_bgp_update_rate;
  import cam_pkg::*;
  import evmdd_host_pkg::*;

  localparam int unsigned N   = N_BITS_DEF;
  localparam int unsigned K   = K_DEF;
  localparam int unsigned RW  = RAIL_W_DEF;
  localparam int unsigned WW  = W_W_DEF;
  localparam int unsigned U   = num_cells(N, K);
  localparam int unsigned SW  = sel_width(U);
  localparam int unsigned LAT = U + 1;
  localparam int unsigned MAX_INDEX = (1 << WW) - 1;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          in_valid;
  logic [N-1:0]  in_key;
  logic          out_valid;
  logic [WW-1:0] out_index;
  logic          upd_valid;
  logic [SW-1:0] upd_stage;
  logic [K-1:0]  upd_digit;
  logic [RW-1:0] upd_node, upd_rail;
  logic [WW-1:0] upd_weight;

  evmdd_cam dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_hit = 0, n_miss = 0, n_b2b = 0, n_overlap = 0, n_add = 0, n_del = 0;
  int n_words = 0, max_words = 0;

  typedef struct {
    bit     check;
    int     exp_idx;
    longint issued;
    bit [N-1:0] key;
  } pend_t;
  pend_t pend[$];

  evmdd_host host;
  bit used_index [int];

  // result monitor
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      pend_t p;
      if (pend.size() == 0) begin
        failures++;
        $display("FAIL: result with no lookup pending");
      end else begin
        p = pend.pop_front();
        if (p.check) begin
          checks += 2;
          if (int'(out_index) != p.exp_idx) begin
            failures++;
            if (failures < 10)
              $display("FAIL: key %h index %0d expected %0d", p.key, out_index, p.exp_idx);
          end
          if (cycle - p.issued != longint'(LAT)) begin
            failures++;
            if (failures < 10)
              $display("FAIL: latency %0d expected %0d", cycle - p.issued, LAT);
          end
          if (p.exp_idx == 0) n_miss++; else n_hit++;
        end
      end
    end
  end

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit last_lookup = 1'b0;

  // drive one clock: optional lookup, optional write
  task automatic drive(bit do_look, bit [N-1:0] key, bit chk, bit do_wr, word_t w);
    pend_t p;
    @(negedge clk);
    in_valid   = do_look;
    in_key     = key;
    upd_valid  = do_wr;
    upd_stage  = SW'(w.stage);
    upd_digit  = K'(w.digit);
    upd_node   = RW'(w.node);
    upd_rail   = RW'(w.rail);
    upd_weight = WW'(w.weight);
    if (do_look) begin
      p.check = chk; p.key = key;
      p.exp_idx = chk ? host.lpm(64'(key)) : 0;
      p.issued = cycle;       // count read at the coming sampling edge
      pend.push_back(p);
      if (last_lookup) n_b2b++;
      if (do_wr) n_overlap++;
    end
    last_lookup = do_look;
  endtask

  function automatic bit [N-1:0] pick_key();
    bit [N-1:0] key;
    key = N'({$urandom, $urandom});
    if (host.rules.size() > 0 && $urandom_range(1, 0) == 1) begin
      rule_t r;
      r = host.rules[$urandom_range(host.rules.size() - 1, 0)];
      key = N'(r.val) | (key & ~N'(r.mask));
    end
    return key;
  endfunction

  function automatic int free_index();
    int idx;
    do idx = $urandom_range(MAX_INDEX, 1); while (used_index.exists(idx));
    return idx;
  endfunction

  function automatic int rand_len();
    int r;
    r = $urandom_range(99, 0);
    if (r < 3) return $urandom_range(7, 1);
    if (r < 60) return $urandom_range(24, 8);
    return $urandom_range(N, 25);
  endfunction

  task automatic add_random_rule();
    bit [63:0] val;
    int len, idx;
    do begin
      val = 64'(N'({$urandom, $urandom}));
      len = rand_len();
    end while (host.has_rule(val, len));
    idx = free_index();
    used_index[idx] = 1'b1;
    host.add_rule(val, len, idx);
  endtask

  int last_words = 0;

  task automatic write_all(bit with_lookups);
    word_t ws[$];
    word_t none;
    host.build(ws);
    n_words += ws.size();
    last_words = ws.size();
    foreach (ws[i])
      drive(with_lookups && ($urandom_range(3, 0) != 0), pick_key(), 1'b0, 1'b1, ws[i]);
    none = '{default: 0};
    drive(1'b0, '0, 1'b0, 1'b0, none);
  endtask

  task automatic lookups(int count);
    word_t none;
    none = '{default: 0};
    for (int i = 0; i < count; i++)
      drive($urandom_range(7, 0) != 0, pick_key(), 1'b1, 1'b0, none);
    drive(1'b0, '0, 1'b0, 1'b0, none);
  endtask

  task automatic drain();
    while (pend.size() != 0) @(posedge clk);
  endtask

  initial begin
    int worst = 0;
    longint total = 0;
    rst_n = 1'b0;
    in_valid = 1'b0; in_key = '0;
    upd_valid = 1'b0; upd_stage = '0; upd_digit = '0;
    upd_node = '0; upd_rail = '0; upd_weight = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    host = new(N, K, RW, WW);
    while (host.rules.size() < MAX_INDEX) add_random_rule();
    write_all(1'b0);
    lookups(500);
    drain();

    for (int u = 0; u < 200; u++) begin
      int pos;
      longint t0;
      pos = $urandom_range(host.rules.size() - 1, 0);
      used_index.delete(host.rules[pos].index);
      host.del_rule_at(pos);
      n_del++;
      add_random_rule();
      n_add++;
      t0 = cycle;
      write_all(1'b1);
      if (int'(cycle - t0) > worst) worst = int'(cycle - t0);
      total += cycle - t0;
      drain();
      lookups(20);
      drain();
    end

    $display("clocks per update: worst %0d, mean %0d; at 48 MHz worst case %0d updates/s",
             worst, total / 200, 48_000_000 / worst);
    checks += 3;
    if (worst > 480) begin failures++; $display("FAIL: update takes %0d clocks", worst); end
    if (n_overlap == 0) begin failures++; $display("FAIL: no write during lookup"); end
    if (n_hit == 0) begin failures++; $display("FAIL: no matching lookup"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
