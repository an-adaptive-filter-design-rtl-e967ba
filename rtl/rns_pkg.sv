// Shared definitions for the residue number system (RNS) FIR filter.
//
// The filter works in the moduli set {2^n+1, 2^n, 2^n-1}. These three
// moduli are pairwise coprime for any n, and each has cheap arithmetic:
// modulo 2^n is plain n-bit wrap-around, modulo 2^n-1 uses an end-around
// carry, and modulo 2^n+1 needs one extra bit and a correction adder.
// modulus_e names the three channels; the helper functions give the value
// of a modulus and the width of its residues, and are used at elaboration
// time only (coefficient residues, residue widths).
package rns_pkg;

  // Which of the three moduli a channel works in.
  typedef enum logic [1:0] {
    MOD_2N_P1 = 2'd0,   // 2^n + 1, residues are n+1 bits wide
    MOD_2N    = 2'd1,   // 2^n,     residues are n bits wide
    MOD_2N_M1 = 2'd2    // 2^n - 1, residues are n bits wide
  } modulus_e;

  // Value of the modulus of a channel.
  function automatic longint unsigned modulus_value(modulus_e kind, int unsigned n);
    longint unsigned p;
    p = longint'(1) << n;
    case (kind)
      MOD_2N_P1: return p + 1;
      MOD_2N_M1: return p - 1;
      default:   return p;
    endcase
  endfunction

  // Width of a residue of a channel.
  function automatic int unsigned residue_width(modulus_e kind, int unsigned n);
    return (kind == MOD_2N_P1) ? n + 1 : n;
  endfunction

  // Dynamic range M = (2^n+1) * 2^n * (2^n-1) = 2^3n - 2^n.
  function automatic longint unsigned dynamic_range(int unsigned n);
    return (longint'(1) << (3 * n)) - (longint'(1) << n);
  endfunction

endpackage
