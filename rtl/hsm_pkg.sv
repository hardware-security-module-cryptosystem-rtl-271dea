// hsm_pkg: types and constants shared by the Petri-net hardware security module.
//
// The key generator is a Petri net with six places (P1..P6) and six transitions
// (T1..T6), all arcs of weight 1, taken from the net drawn for the design:
//   T1: P1 -> P2, P5      T2: P2 -> P3      T3: P3 -> P4
//   T4: P5 -> P6          T5: P2 -> P4      T6: P4, P6 -> P1
// PN_PRE[t][p] is 1 when place p is an input of transition t, PN_POST[t][p]
// when it is an output (bit p-1 stands for place Pp). Each place holds an
// 8-bit token count; the private key is the final marking, P1 in the most
// significant byte of the 48 marking bits, zero-extended to 64 bits.
// Everything except the net, the 8-bit registers, the 64-bit key and the
// XOR cipher is a choice of this implementation (see the module headers).
package hsm_pkg;

  localparam int unsigned NUM_PLACES = 6;
  localparam int unsigned NUM_TRANS  = 6;
  localparam int unsigned PLACE_W    = 8;
  localparam int unsigned COUNT_W    = 8;
  localparam int unsigned KEY_W      = 64;

  typedef logic [NUM_TRANS-1:0][NUM_PLACES-1:0] pn_matrix_t;

  //                               P6 P5 P4 P3 P2 P1
  localparam pn_matrix_t PN_PRE = '{6'b101000,   // T6
                                    6'b000010,   // T5
                                    6'b010000,   // T4
                                    6'b000100,   // T3
                                    6'b000010,   // T2
                                    6'b000001};  // T1
  localparam pn_matrix_t PN_POST = '{6'b000001,  // T6
                                     6'b001000,  // T5
                                     6'b100000,  // T4
                                     6'b001000,  // T3
                                     6'b000100,  // T2
                                     6'b010010}; // T1

  // Secure ROM map: words 0..5 are the initial markings of P1..P6 (master key
  // bytes S0..S5), word 6 is the firing count N.
  localparam int unsigned ROM_WORDS  = NUM_PLACES + 1;
  localparam int unsigned ROM_ADDR_W = $clog2(ROM_WORDS);
  localparam int unsigned ROM_N_ADDR = NUM_PLACES;

  typedef enum logic [1:0] {
    KG_IDLE = 2'd0,
    KG_FIRE = 2'd1,
    KG_DONE = 2'd2
  } kg_state_e;

endpackage
