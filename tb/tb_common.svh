// Shared reference arithmetic for the testbenches: modular products with
// the % operator (independent of the Barrett datapath), powers, the
// Barrett constant, a direct negacyclic NTT and the lane PRNG model.
// Included inside testbench modules; functions only, no timing.
`ifndef TB_COMMON_SVH
`define TB_COMMON_SVH
function automatic fhe_pkg::word_t ref_mm(fhe_pkg::word_t a, fhe_pkg::word_t b, fhe_pkg::word_t q);
  logic [2*fhe_pkg::W-1:0] p; p = a * b; return fhe_pkg::word_t'(p % q);
endfunction
function automatic fhe_pkg::word_t ref_pw(fhe_pkg::word_t b, longint unsigned e, fhe_pkg::word_t q);
  fhe_pkg::word_t r = 1;
  while (e != 0) begin if (e[0]) r = ref_mm(r, b, q); b = ref_mm(b, b, q); e >>= 1; end
  return r;
endfunction
function automatic fhe_pkg::mu_t ref_mu(fhe_pkg::word_t q);
  logic [2*fhe_pkg::W+1:0] t; t = (2*fhe_pkg::W+2)'(1) << (2*fhe_pkg::W);
  return fhe_pkg::mu_t'(t / q);
endfunction
function automatic logic [63:0] ref_xs(logic [63:0] v);
  v = v ^ (v << 13); v = v ^ (v >> 7); v = v ^ (v << 17); return v;
endfunction
function automatic fhe_pkg::word_t ref_prng(logic [63:0] st, fhe_pkg::word_t q);
  fhe_pkg::word_t x; x = st[fhe_pkg::W-1:0]; return (x >= q) ? x - q : x;
endfunction
`endif
