// evmdd_host_pkg: behavioural model of the update host, for testbenches.
//
// The class evmdd_host keeps a prefix table (value, length, index), answers
// longest-prefix-match queries directly from it (the reference model), and
// builds the words of every cascade cell from it. build() returns only the
// words that differ from what the host wrote before, which is what the
// cascade's update port needs after a prefix is added or deleted. Words are
// returned last cell first, so that new child nodes are written before the
// words that point to them.
//
// Construction of the diagram. A node on level i (before super variable
// X_{i+1}) stands for the key bits v consumed so far (i*K bits).
//  * On a level whose rails are not capped (i*K <= RAIL_W, including the
//    root level) every path has its own node and its number is v itself.
//  * On a capped level, a path gets a node of its own only if some prefix
//    longer than i*K bits starts with v. All other paths lead to one shared
//    node, number 0, under which the function is constant: its edges have
//    weight 0 and lead to node 0 again. Nodes of their own keep their
//    number for as long as they exist; a new node takes the lowest free
//    number from 1 up. So an update rewrites only the nodes it changes.
// The edge from v with digit j has the weight f(vj00..0) - f(v00..0), and
// the root's edges have weight f(j00..0), so the weights along a key's path
// add up to f(key). This is the edge-valued normalisation of the decision
// diagram: every 0-edge has weight 0. Nodes with equal subfunctions other
// than the constant one are not merged, so the diagram is not fully
// reduced; a capped level has at most one node per prefix longer than
// i*K bits, plus node 0.
package evmdd_host_pkg;

  typedef struct {
    bit [63:0] val;    // prefix, left-aligned in N bits, low bits zero
    int        len;    // prefix length in bits, 0..N
    int        index;  // value the lookup returns on this match
    bit [63:0] mask;   // ones on the first len bits
  } rule_t;

  typedef struct {
    int        stage;
    bit [63:0] digit;
    bit [63:0] node;
    bit [63:0] rail;
    bit [63:0] weight;
  } word_t;

  class evmdd_host;
    int n, k, u, rail_w, w_w;
    rule_t rules[$];
    // words written so far, keyed by {stage, digit, node}
    bit [127:0] written [bit [127:0]];
    int max_width;
    int level_width [int];   // widest seen per level

    function new(int n_bits, int k_bits, int rail_bits, int weight_bits);
      n = n_bits; k = k_bits; rail_w = rail_bits; w_w = weight_bits;
      u = (n + k - 1) / k;
      max_width = 0;
    endfunction

    function automatic bit [63:0] mask_top(int len);
      bit [63:0] m;
      m = '0;
      for (int b = 0; b < len; b++) m[n-1-b] = 1'b1;
      return m;
    endfunction

    // index of the longest stored prefix matching key, 0 if none
    function automatic int lpm(bit [63:0] key);
      int best_len, best;
      best_len = -1; best = 0;
      foreach (rules[r]) begin
        if (rules[r].len > best_len &&
            ((key ^ rules[r].val) & rules[r].mask) == 0) begin
          best_len = rules[r].len;
          best = rules[r].index;
        end
      end
      return best;
    endfunction

    function automatic bit has_rule(bit [63:0] val, int len);
      foreach (rules[r])
        if (rules[r].len == len && rules[r].val == (val & mask_top(len))) return 1'b1;
      return 1'b0;
    endfunction

    function automatic void add_rule(bit [63:0] val, int len, int index);
      rule_t r;
      r.val = val & mask_top(len);
      r.len = len;
      r.index = index;
      r.mask = mask_top(len);
      rules.push_back(r);
    endfunction

    function automatic void del_rule_at(int pos);
      rules.delete(pos);
    endfunction

    // the first i*K bits of a left-aligned key, as a number
    function automatic bit [63:0] path_of(bit [63:0] key, int i);
      bit [63:0] p;
      p = '0;
      for (int b = 0; b < i * k; b++) begin
        p = p << 1;
        if (n - 1 - b >= 0) p[0] = key[n-1-b];
      end
      return p;
    endfunction

    // left-aligned key whose first i*K bits are path, the rest zero
    function automatic bit [63:0] key_of(bit [63:0] path, int i);
      bit [63:0] key;
      key = '0;
      for (int b = 0; b < i * k; b++)
        if (n - 1 - b >= 0) key[n-1-b] = path[i*k-1-b];
      return key;
    endfunction

    // every path of level i has a node numbered by the path itself
    function automatic bit path_indexed(int i);
      return i * k <= rail_w;
    endfunction

    // stable node numbers of the capped levels: level -> path -> number
    int node_id [int][bit [63:0]];

    // Renumber capped level i: drop nodes whose path no longer leads to a
    // longer prefix, give new ones the lowest free number from 1 up.
    function automatic void update_ids(int i);
      bit want [bit [63:0]];
      bit used [int];
      bit [63:0] drop [$];
      int next;
      foreach (rules[r])
        if (rules[r].len > i * k) want[path_of(rules[r].val, i)] = 1'b1;
      if (node_id.exists(i))
        foreach (node_id[i][p]) if (!want.exists(p)) drop.push_back(p);
      foreach (drop[d]) node_id[i].delete(drop[d]);
      if (node_id.exists(i))
        foreach (node_id[i][p]) used[node_id[i][p]] = 1'b1;
      next = 1;
      foreach (want[p])
        if (!node_id.exists(i) || !node_id[i].exists(p)) begin
          while (used.exists(next)) next++;
          node_id[i][p] = next;
          used[next] = 1'b1;
        end
    endfunction

    // number of the node for path v on level i
    function automatic int id_of(bit [63:0] v, int i);
      if (path_indexed(i)) return int'(v);
      if (node_id.exists(i) && node_id[i].exists(v)) return node_id[i][v];
      return 0;
    endfunction

    // rules that can decide f below path v of level i
    function automatic void candidates(bit [63:0] v, int i, ref int cand[$]);
      bit [63:0] key, m;
      cand.delete();
      key = key_of(v, i);
      m = mask_top(i * k);
      foreach (rules[r])
        if (((key ^ rules[r].val) & rules[r].mask & m) == 0) cand.push_back(r);
    endfunction

    function automatic int lpm_in(bit [63:0] key, ref int cand[$]);
      int best_len, best;
      best_len = -1; best = 0;
      foreach (cand[c]) begin
        if (rules[cand[c]].len > best_len &&
            ((key ^ rules[cand[c]].val) & rules[cand[c]].mask) == 0) begin
          best_len = rules[cand[c]].len;
          best = rules[cand[c]].index;
        end
      end
      return best;
    endfunction

    // the words of node v on level i
    function automatic void node_words(bit [63:0] v, int i, ref word_t q[$]);
      int cand[$];
      int base;
      word_t w;
      candidates(v, i, cand);
      base = (i == 0) ? 0 : lpm_in(key_of(v, i), cand);
      for (int j = 0; j < (1 << k); j++) begin
        bit [63:0] c;
        c = (v << k) | j;
        w.stage = i; w.digit = j; w.node = id_of(v, i);
        w.rail = (i + 1 < u) ? id_of(c, i + 1) : 0;
        w.weight = (lpm_in(key_of(c, i + 1), cand) - base) & ((64'd1 << w_w) - 1);
        q.push_back(w);
      end
    endfunction

    // Build all cell words; return those not yet written with this value.
    function automatic void build(ref word_t out[$]);
      word_t lvl [int][$];
      word_t q [$];
      word_t w;
      int width;
      out.delete();
      for (int i = 1; i < u; i++) if (!path_indexed(i)) update_ids(i);
      for (int i = 0; i < u; i++) begin
        q.delete();
        if (path_indexed(i)) begin
          for (longint v = 0; v < (longint'(1) << (i * k)); v++)
            node_words(64'(v), i, q);
          width = 1 << (i * k);
        end else begin
          // the constant node 0
          for (int j = 0; j < (1 << k); j++) begin
            w.stage = i; w.digit = j; w.node = 0; w.rail = 0; w.weight = 0;
            q.push_back(w);
          end
          width = 1;
          if (node_id.exists(i))
            foreach (node_id[i][p]) begin
              node_words(p, i, q);
              if (node_id[i][p] + 1 > width) width = node_id[i][p] + 1;
            end
        end
        lvl[i] = q;
        if (width > max_width) max_width = width;
        if (!level_width.exists(i) || width > level_width[i]) level_width[i] = width;
      end
      for (int i = u - 1; i >= 0; i--)
        foreach (lvl[i][x]) emit(lvl[i][x], out);
    endfunction

    function automatic void emit(word_t w, ref word_t out[$]);
      bit [127:0] addr, data;
      addr = {32'(w.stage), 32'(w.digit), 64'(w.node)};
      data = {w.rail, w.weight};
      if (!written.exists(addr) || written[addr] != data) begin
        written[addr] = data;
        out.push_back(w);
      end
    endfunction
  endclass

endpackage
