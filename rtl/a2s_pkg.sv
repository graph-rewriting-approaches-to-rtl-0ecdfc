// a2s_pkg - shared definitions for the asynchronous-to-synchronous memory
// rewriting examples.
//
// The example circuits use read-only memories that store f(i) at address i.
// No particular f is prescribed for them, so every ROM here is filled from
// rom_word(), a fixed multiply/xor-shift mix of the address with a per-ROM
// seed.  rom_word(seed, 0) is 0 for every seed: a memory read of address 0
// then looks the same as the all-zero reset value of a register or of a
// synchronous ROM's output, so an original circuit and its rewrite agree from
// the very first clock instead of only after a few cycles.
package a2s_pkg;

  // Default word and address width of every example (a design choice).
  parameter int unsigned DEFAULT_W = 8;

  // Content of ROM 'seed' at address 'a'.  Callers keep the low W bits.
  function automatic logic [31:0] rom_word(input int unsigned seed, input logic [31:0] a);
    logic [31:0] x;
    x = a * (32'h9E37_79B1 + (seed << 4));
    x = x ^ (x >> 15);
    x = x * 32'h2C1B_3C6D;
    x = x ^ (x >> 12);
    return x;
  endfunction

  // Functions of the combinational-circuit (CC) nodes of the examples.  Their
  // functions are free choices; each one maps all-zero inputs to zero and
  // uses only +, ^, << and *, so the low W bits of a result depend only on the
  // low W bits of the operands and callers may simply truncate to W bits.

  // Acyclic ROM example: top-right CC (two outputs), left CC (two outputs),
  // bottom-right CC.
  function automatic logic [31:0] dag_t_left (input logic [31:0] x);            return x ^ (x << 1);  endfunction
  function automatic logic [31:0] dag_t_down (input logic [31:0] x);            return x * 5;         endfunction
  function automatic logic [31:0] dag_l_out  (input logic [31:0] r, input logic [31:0] t); return r + t;       endfunction
  function automatic logic [31:0] dag_l_right(input logic [31:0] r, input logic [31:0] t); return r ^ (t * 3); endfunction
  function automatic logic [31:0] dag_b      (input logic [31:0] r, input logic [31:0] l); return (r + l) ^ (r << 2); endfunction

  // Acyclic RAM example: top-right CC, left CC (drives we/A/D of the third
  // RAM and the bottom-right CC), bottom-right CC.
  function automatic logic [31:0] rd_t_left (input logic [31:0] x);            return x ^ (x << 2);  endfunction
  function automatic logic [31:0] rd_t_down (input logic [31:0] x);            return x * 3;         endfunction
  function automatic logic [31:0] rd_l_addr (input logic [31:0] r, input logic [31:0] t); return r + t;          endfunction
  function automatic logic [31:0] rd_l_data (input logic [31:0] r, input logic [31:0] t); return r ^ (t << 1);   endfunction
  function automatic logic        rd_l_we   (input logic [31:0] r, input logic [31:0] t); return ^((r + t) & 32'h5); endfunction
  function automatic logic [31:0] rd_l_right(input logic [31:0] r, input logic [31:0] t); return r * 5 + t;      endfunction
  function automatic logic [31:0] rd_b      (input logic [31:0] r, input logic [31:0] l); return r ^ l;          endfunction

  // First cycle example: upper CC (ROM word, feedback), lower CC (feedback
  // and output).
  function automatic logic [31:0] cyc_top (input logic [31:0] a, input logic [31:0] fb); return a ^ (fb * 3); endfunction
  function automatic logic [31:0] cyc_fb  (input logic [31:0] x); return x * 7;        endfunction
  function automatic logic [31:0] cyc_out (input logic [31:0] x); return x ^ (x << 2); endfunction

  // Second cycle example: upper CC (input, feedback) drives the ROM address;
  // lower CC (ROM word) drives feedback and output.
  function automatic logic [31:0] cyc2_top(input logic [31:0] i, input logic [31:0] fb); return i + fb; endfunction
  function automatic logic [31:0] cyc2_fb (input logic [31:0] x); return x * 3;        endfunction
  function automatic logic [31:0] cyc2_out(input logic [31:0] x); return x ^ (x << 1); endfunction

  // Layered SROM example: the three CCs between the two SROM rows.
  function automatic logic [31:0] lay_b_left (input logic [31:0] p, input logic [31:0] q); return p + q;     endfunction
  function automatic logic [31:0] lay_b_mid  (input logic [31:0] p, input logic [31:0] q); return p ^ q;     endfunction
  function automatic logic [31:0] lay_b_right(input logic [31:0] p, input logic [31:0] q); return p * 3 + q; endfunction
  function automatic logic [31:0] lay_a_rom  (input logic [31:0] r, input logic [31:0] b); return r ^ b;     endfunction
  function automatic logic [31:0] lay_a_mid  (input logic [31:0] r, input logic [31:0] b); return r + b;     endfunction
  function automatic logic [31:0] lay_c      (input logic [31:0] a, input logic [31:0] r); return a ^ (r * 5); endfunction
  function automatic logic [31:0] lay_d      (input logic [31:0] b); return b * 7; endfunction

endpackage
