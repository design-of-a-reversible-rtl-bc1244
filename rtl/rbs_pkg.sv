// rbs_pkg: shared constants and cost formulas of the (n,k) reversible
// bidirectional arithmetic/logical barrel shifter.
//
// The shifter is built only from two reversible gates: the 2x2 Feynman
// (CNOT) gate, used purely as a fan-out copier with a constant-0 ancilla
// input, and the 3x3 Fredkin (controlled swap) gate, used as a 2:1 mux.
// The functions below give, for a shifter with n data bits and k select
// lines, how many of each gate the structure needs and the resulting number
// of garbage outputs, ancilla inputs and quantum cost. The rtl modules size
// their ancilla-input and garbage-output ports with these functions, so the
// port widths of the top are the circuit's actual ancilla/garbage counts.
//
// Cost model (follows the source design): a Feynman gate costs 1 and a
// Fredkin gate costs 5 quantum primitives.
package rbs_pkg;

  localparam int unsigned FE_COST = 1;  // quantum cost of a Feynman gate
  localparam int unsigned FR_COST = 5;  // quantum cost of a Fredkin gate

  // Feynman copiers in one shifter stage that shifts by s bits: every data
  // bit at position j >= s is needed twice (kept at j, moved to j - s).
  function automatic int unsigned stage_fe_count(int unsigned n, int unsigned s);
    return n - s;
  endfunction

  // Feynman gates: 2^k - 1 in the arithmetic right shift control unit
  // (one sign copier plus 2^k - 2 fill-bit copiers), n - 2^m in the shifter
  // stage that shifts by 2^m, one in the arithmetic left shift control unit.
  function automatic int unsigned fe_count(int unsigned n, int unsigned k);
    int unsigned acc;
    acc = (1 << k);
    for (int unsigned m = 0; m < k; m++) acc += stage_fe_count(n, 1 << m);
    return acc;
  endfunction

  // Fredkin gates: n/2 in each data reversal unit, n per shifter stage,
  // one in each arithmetic control unit.
  function automatic int unsigned fr_count(int unsigned n, int unsigned k);
    return n * (k + 1) + 2;
  endfunction

  // Garbage outputs: n+1 per shifter stage (one unused mux output per gate
  // plus the select line leaving the last gate), two per arithmetic control
  // unit, one (the direction line) leaving data reversal unit II.
  function automatic int unsigned garbage_count(int unsigned n, int unsigned k);
    return k * (n + 1) + 5;
  endfunction

  // Ancilla inputs: one constant 0 per Feynman gate plus the constant 0
  // input of the arithmetic right shift Fredkin gate.
  function automatic int unsigned ancilla_count(int unsigned n, int unsigned k);
    return fe_count(n, k) + 1;
  endfunction

  function automatic int unsigned quantum_cost(int unsigned n, int unsigned k);
    return FR_COST * fr_count(n, k) + FE_COST * fe_count(n, k);
  endfunction

  // Ancilla inputs of the sub-units (they partition ancilla_count()).
  function automatic int unsigned ars_ancilla_count(int unsigned k);
    return (1 << k);  // 2^k - 1 Feynman gates + the Fredkin gate's 0 input
  endfunction

  function automatic int unsigned shifter_ancilla_count(int unsigned n, int unsigned k);
    int unsigned acc;
    acc = 0;
    for (int unsigned m = 0; m < k; m++) acc += stage_fe_count(n, 1 << m);
    return acc;
  endfunction


  // Operations of Table-I style control encoding {sra, sla, left}.
  typedef enum logic [2:0] {
    OP_LSR = 3'b000,  // logical right shift
    OP_ASR = 3'b100,  // arithmetic right shift
    OP_LSL = 3'b001,  // logical left shift
    OP_ASL = 3'b011   // arithmetic left shift
  } shift_op_e;

endpackage
