// cam_pkg: default sizes of the EVMDD(k) LUT-cascade CAM emulator.
//
// The cascade evaluates an n-input longest-prefix-match function with
// u = ceil(n/k) LUT cells. Cell i is addressed by the super variable X_i
// (k key bits, most significant first) and by the rails coming from cell
// i-1, which name the current node of the edge-valued decision diagram.
// It returns the rails of the next node and the weight of the edge taken.
// The index of the matched rule is the sum of the weights along the path.
//
// Defaults: IPv4 keys (n = 32) and a table of up to 1023 prefixes, the
// largest table evaluated for this architecture; rail and weight widths
// are ceil(log2(p+1)). The super-variable size k = 4 is this design's choice.
package cam_pkg;

  parameter int unsigned N_BITS_DEF = 32;    // key length n (IPv4)
  parameter int unsigned K_DEF      = 4;     // bits per super variable k
  parameter int unsigned P_DEF      = 1023;  // number of stored prefixes p
  // rails between cells and width of the Arail (edge weight): ceil(log2(p+1))
  parameter int unsigned RAIL_W_DEF = $clog2(P_DEF + 1);
  parameter int unsigned W_W_DEF    = $clog2(P_DEF + 1);

  // number of cells u = ceil(n/k)
  function automatic int unsigned num_cells(int unsigned n, int unsigned k);
    return (n + k - 1) / k;
  endfunction

  // Rails between cell b-1 and cell b (b = 1..u-1). Level b of the diagram
  // has at most 2^(k*b) nodes, one per value of the first k*b key bits, and
  // at most 2^rail_w by the chosen capacity; there are no rails into the
  // first cell (one root) and none out of the last (the terminal).
  function automatic int unsigned rails_at(int unsigned b, int unsigned k,
                                           int unsigned rail_w, int unsigned u);
    if (b == 0 || b >= u) return 0;
    return (k * b < rail_w) ? k * b : rail_w;
  endfunction

  // width of a field that holds a cell number 0..u-1 (at least 1 bit)
  function automatic int unsigned sel_width(int unsigned u);
    return (u > 1) ? $clog2(u) : 1;
  endfunction

endpackage
