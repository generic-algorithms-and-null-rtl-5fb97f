// ncl_pkg - shared types and helpers for the quad-rail NULL Convention Logic (NCL) arithmetic library.
//
// NCL signals are 1-of-n codes. A quad-rail signal has four rails; exactly one asserted rail k means the
// value k (DATA0..DATA3), all rails low means NULL (no data yet). A three-rail signal carries 0..2, a
// dual-rail signal 0..1. Some dual-rail signals in the 2's complement multiplier stand for other value
// pairs (0/2 or 2/3); the module using them says so.
//
// The library is written as a unit-delay model of asynchronous NCL: every threshold gate is a state-holding
// element that updates on a common clock edge, so one clock cycle equals one gate delay. The hysteresis of
// the gates (output held until all inputs return to 0) is modelled exactly. This is a choice of this code
// base, not of the asynchronous circuits it models; it keeps the model free of combinational loops.
package ncl_pkg;

  typedef logic [3:0] qr_t;   // quad-rail: rail k asserted = value k
  typedef logic [2:0] tr_t;   // three-rail
  typedef logic [1:0] dr_t;   // dual-rail

  // The 27 fundamental NCL gates (Table of fundamental gates: THmn, weighted THmnWw.., and three macros).
  typedef enum logic [4:0] {
    TH12, TH22, TH13, TH23, TH33, TH23W2, TH33W2, TH14, TH24, TH34, TH44, TH24W2, TH34W2, TH44W2,
    TH34W3, TH44W3, TH24W22, TH34W22, TH44W22, TH54W22, TH34W32, TH54W32, TH44W322, TH54W322,
    THXOR0, THAND0, TH24COMP
  } gate_e;

  // Number of inputs of a gate.
  function automatic int gate_inputs(gate_e fn);
    case (fn)
      TH12, TH22:                        return 2;
      TH13, TH23, TH33, TH23W2, TH33W2:  return 3;
      default:                           return 4;
    endcase
  endfunction

  // Set function of a gate; inputs A..D are v[0]..v[3] (unused inputs are 0).
  function automatic logic gate_set(gate_e fn, logic [3:0] v);
    logic a, b, c, d;
    {d, c, b, a} = v;
    case (fn)
      TH12:     return a | b;
      TH22:     return a & b;
      TH13:     return a | b | c;
      TH23:     return (a & b) | (a & c) | (b & c);
      TH33:     return a & b & c;
      TH23W2:   return a | (b & c);
      TH33W2:   return (a & b) | (a & c);
      TH14:     return a | b | c | d;
      TH24:     return (a & b) | (a & c) | (a & d) | (b & c) | (b & d) | (c & d);
      TH34:     return (a & b & c) | (a & b & d) | (a & c & d) | (b & c & d);
      TH44:     return a & b & c & d;
      TH24W2:   return a | (b & c) | (b & d) | (c & d);
      TH34W2:   return (a & b) | (a & c) | (a & d) | (b & c & d);
      TH44W2:   return (a & b & c) | (a & b & d) | (a & c & d);
      TH34W3:   return a | (b & c & d);
      TH44W3:   return (a & b) | (a & c) | (a & d);
      TH24W22:  return a | b | (c & d);
      TH34W22:  return (a & b) | (a & c) | (a & d) | (b & c) | (b & d);
      TH44W22:  return (a & b) | (a & c & d) | (b & c & d);
      TH54W22:  return (a & b & c) | (a & b & d);
      TH34W32:  return a | (b & c) | (b & d);
      TH54W32:  return (a & b) | (a & c & d);
      TH44W322: return (a & b) | (a & c) | (a & d) | (b & c);
      TH54W322: return (a & b) | (a & c) | (b & c & d);
      THXOR0:   return (a & b) | (c & d);
      THAND0:   return (a & b) | (b & c) | (a & d);
      TH24COMP: return (a & c) | (b & c) | (a & d) | (b & d);
      default:  return 1'b0;
    endcase
  endfunction

  // Value of a 1-of-n signal, or -1 for NULL or an illegal (multi-rail) state.
  function automatic int mv_value(logic [3:0] r);
    case (r)
      4'b0001: return 0;
      4'b0010: return 1;
      4'b0100: return 2;
      4'b1000: return 3;
      default: return -1;
    endcase
  endfunction

  // One-hot encoding of a value 0..3.
  function automatic logic [3:0] mv_enc(int v);
    return 4'b0001 << v;
  endfunction

endpackage
