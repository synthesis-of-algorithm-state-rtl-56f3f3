// asm_pkg -- shared types and tables of the combined-addressing automaton.
//
// The automaton stores one microinstruction per algorithm state machine (ASM)
// state.  A microinstruction has four fields: a flag FF, the micro-operation
// field FMO (stop signal Z and micro-operations y1..y6, one bit each), the
// logical-condition field FLC and the false-address field FFA.  When FF is 1
// the next address comes from the PLA address circuit CA1 and FLC/FFA are
// don't-care; when FF is 0 the single-condition circuit CA2 tests the condition
// named by FLC and the address register either adds one (condition true) or
// takes FFA (condition false).  FLC = 00 is the unconditional transition: it
// tests a constant 0 and so always takes FFA.
//
// The field widths (FF 1, FMO 7, FLC 2, FFA 4 bits; 14-bit word, 11 words),
// the state codes, the microprogram and the CA1 product terms are those of the
// worked example ASM "G1".  The microprogram is partitioned at design time:
// every state whose exit depends on two or more conditions (a2, a7, a8) goes to
// CA1, every other state (single condition or unconditional) to CA2.
//
// Own choices: y is held in a descending vector (bit n is yn) and is written
// below as an OR of the one-hot constants Y1..Y6; unused memory words are zero
// (an unconditional jump to a1 with no micro-operation); don't-care FLC/FFA
// fields of CA1 states are stored as zero.
package asm_pkg;

  localparam int unsigned ADDR_W    = 4;   // R: address / FFA width
  localparam int unsigned N_MO      = 6;   // N: micro-operations y1..y6
  localparam int unsigned N_LC      = 7;   // L: logical conditions x1..x7
  localparam int unsigned FLC_W     = 2;   // FLC width
  localparam int unsigned N_X1      = 6;   // conditions seen by CA1: x1..x6
  localparam int unsigned MPM_DEPTH = 11;  // microinstructions of G1
  localparam int unsigned PLA_TERMS = 11;  // product terms of CA1 for G1

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [N_MO:1]     mo_t;         // bit n is micro-operation yn
  typedef logic [N_LC:1]     lc_t;         // bit n is logical condition xn
  typedef logic [N_X1:1]     x1_t;

  typedef struct packed {
    logic z;                               // stop signal
    mo_t  y;                               // micro-operations
  } fmo_t;

  typedef struct packed {
    logic             ff;                  // 1: CA1 forms the next address
    fmo_t             fmo;
    logic [FLC_W-1:0] flc;                 // condition code for CA2
    addr_t            ffa;                 // false (and unconditional) address
  } mi_t;

  // FLC codes of G1.
  localparam logic [FLC_W-1:0] FLC_UNT = 2'b00;  // unconditional: take FFA
  localparam logic [FLC_W-1:0] FLC_X7  = 2'b01;
  localparam logic [FLC_W-1:0] FLC_X3  = 2'b10;

  // State codes of G1 (address of the state's microinstruction).
  typedef enum logic [ADDR_W-1:0] {
    A1  = 4'b0000, A3  = 4'b0001, A7 = 4'b0010, A10 = 4'b0011,
    A9  = 4'b0100, A6  = 4'b0101, A2 = 4'b0110, A4  = 4'b0111,
    A5  = 4'b1000, A8  = 4'b1001, A11 = 4'b1010
  } state_e;

  localparam mo_t NO_Y = 6'b000000;
  localparam mo_t Y1 = 6'b000001, Y2 = 6'b000010, Y3 = 6'b000100;
  localparam mo_t Y4 = 6'b001000, Y5 = 6'b010000, Y6 = 6'b100000;

  function automatic mi_t mk_mi(logic ff, logic z, mo_t y,
                                logic [FLC_W-1:0] flc, addr_t ffa);
    mk_mi = '{ff: ff, fmo: '{z: z, y: y}, flc: flc, ffa: ffa};
  endfunction

  // Microprogram of G1, indexed by address.
  localparam mi_t MPM_G1 [2**ADDR_W] = '{
    /* 0000 a1  */ mk_mi(1'b0, 1'b0, NO_Y,    FLC_UNT, A2),
    /* 0001 a3  */ mk_mi(1'b0, 1'b0, Y3 | Y4, FLC_X7,  A3),
    /* 0010 a7  */ mk_mi(1'b1, 1'b0, Y1 | Y5, FLC_UNT, A1),
    /* 0011 a10 */ mk_mi(1'b0, 1'b1, Y1 | Y2, FLC_UNT, A1),
    /* 0100 a9  */ mk_mi(1'b0, 1'b0, Y2 | Y3, FLC_X3,  A8),
    /* 0101 a6  */ mk_mi(1'b0, 1'b0, Y1 | Y5, FLC_UNT, A9),
    /* 0110 a2  */ mk_mi(1'b1, 1'b0, Y1 | Y2, FLC_UNT, A1),
    /* 0111 a4  */ mk_mi(1'b0, 1'b0, Y2 | Y3, FLC_UNT, A8),
    /* 1000 a5  */ mk_mi(1'b0, 1'b0, Y1 | Y4, FLC_UNT, A8),
    /* 1001 a8  */ mk_mi(1'b1, 1'b0, Y3 | Y6, FLC_UNT, A1),
    /* 1010 a11 */ mk_mi(1'b0, 1'b1, Y2,      FLC_UNT, A1),
    /* 1011 */     '0,
    /* 1100 */     '0,
    /* 1101 */     '0,
    /* 1110 */     '0,
    /* 1111 */     '0
  };

  // One row of the CA1 PLA: the term is true when the present state equals
  // am and every condition marked in care has the value in val; it then
  // drives its next-state code onto the OR plane.
  typedef struct packed {
    x1_t   care;
    x1_t   val;
    addr_t am;
    addr_t as_code;
  } pla_term_t;

  function automatic pla_term_t mk_term(x1_t care, x1_t val, addr_t am, addr_t as_code);
    mk_term = '{care: care, val: val, am: am, as_code: as_code};
  endfunction

  // Product terms of CA1 for G1.  Bit n of care/val is xn (x6 .. x1).
  localparam pla_term_t CA1_G1 [PLA_TERMS] = '{
    //       care       val        K(am) K(as)
    mk_term(6'b000011, 6'b000011, A2, A3),   // a2:  x1 x2
    mk_term(6'b000111, 6'b000001, A2, A4),   // a2:  x1 ~x2 ~x3
    mk_term(6'b000111, 6'b000101, A2, A5),   // a2:  x1 ~x2 x3
    mk_term(6'b001001, 6'b001000, A2, A5),   // a2: ~x1 x4
    mk_term(6'b001001, 6'b000000, A2, A6),   // a2: ~x1 ~x4
    mk_term(6'b010000, 6'b010000, A7, A10),  // a7:  x5
    mk_term(6'b110000, 6'b100000, A7, A10),  // a7: ~x5 x6
    mk_term(6'b110000, 6'b000000, A7, A11),  // a7: ~x5 ~x6
    mk_term(6'b010000, 6'b010000, A8, A10),  // a8:  x5
    mk_term(6'b110000, 6'b100000, A8, A10),  // a8: ~x5 x6
    mk_term(6'b110000, 6'b000000, A8, A11)   // a8: ~x5 ~x6
  };

endpackage
