// sc_pkg: types and constants shared by the stochastic-computing (SC) units.
//
// It holds the operator codes of the supported stochastic operators (sum as
// average, multiplication, negation, square, complement), the record that
// describes one node of a stochastic datapath in postfix order, the states of
// the test-platform controller, and two helpers for the bitstream
// generators: a table of maximal-length LFSR taps and a function that spreads
// seeds so that neighbouring generators start far apart in the sequence.
// The operator list follows the framework; the tap table is the usual
// maximal-length one and the seed rule is this design's own choice.
package sc_pkg;

  // Operators a datapath node can use.
  typedef enum logic [2:0] {
    OP_ADD  = 3'd0,  // '+'    scaled sum (average) of its operands
    OP_MUL  = 3'd1,  // '*'    product of its operands
    OP_NEG  = 3'd2,  // '-'    negation (1-a unipolar, -a bipolar)
    OP_POW2 = 3'd3,  // 'pow2' square
    OP_NOT  = 3'd4   // 'not'  complement of the bitstream
  } sc_op_e;

  localparam int unsigned SC_MAX_ARGS = 4;  // operands per node
  localparam int unsigned SC_IDX_W    = 8;  // index into the signal vector

  // One datapath node. Operand indices point into the signal vector made of
  // the datapath inputs followed by the outputs of earlier nodes.
  typedef struct packed {
    sc_op_e                                 op;
    logic [2:0]                             nargs;
    logic [SC_MAX_ARGS-1:0][SC_IDX_W-1:0]   args;
  } sc_node_t;

  function automatic sc_node_t sc_node(sc_op_e op, logic [2:0] n,
                                       logic [SC_IDX_W-1:0] a0,
                                       logic [SC_IDX_W-1:0] a1 = '0,
                                       logic [SC_IDX_W-1:0] a2 = '0,
                                       logic [SC_IDX_W-1:0] a3 = '0);
    sc_node_t nd;
    nd.op      = op;
    nd.nargs   = n;
    nd.args[0] = a0;
    nd.args[1] = a1;
    nd.args[2] = a2;
    nd.args[3] = a3;
    return nd;
  endfunction

  // Test-platform controller states.
  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,  // waiting for start
    ST_LOAD    = 3'd1,  // reload generator seeds, clear datapath and counters
    ST_BURNIN  = 3'd2,  // streams run, outputs not yet counted
    ST_RUN     = 3'd3,  // one bitstream length is converted
    ST_CAPTURE = 3'd4   // counters copied to the result memory
  } plat_state_e;

  // Feedback taps (bit i set = stage i+1 is tapped) of a maximal-length
  // Fibonacci LFSR of w bits, for 3 <= w <= 32.
  function automatic logic [31:0] lfsr_taps(int unsigned w);
    logic [31:0] t;
    case (w)
      3:  t = (32'd1 << 2)  | (32'd1 << 1);
      4:  t = (32'd1 << 3)  | (32'd1 << 2);
      5:  t = (32'd1 << 4)  | (32'd1 << 2);
      6:  t = (32'd1 << 5)  | (32'd1 << 4);
      7:  t = (32'd1 << 6)  | (32'd1 << 5);
      8:  t = (32'd1 << 7)  | (32'd1 << 5) | (32'd1 << 4) | (32'd1 << 3);
      9:  t = (32'd1 << 8)  | (32'd1 << 4);
      10: t = (32'd1 << 9)  | (32'd1 << 6);
      11: t = (32'd1 << 10) | (32'd1 << 8);
      12: t = (32'd1 << 11) | (32'd1 << 5) | (32'd1 << 3) | (32'd1 << 0);
      13: t = (32'd1 << 12) | (32'd1 << 3) | (32'd1 << 2) | (32'd1 << 0);
      14: t = (32'd1 << 13) | (32'd1 << 4) | (32'd1 << 2) | (32'd1 << 0);
      15: t = (32'd1 << 14) | (32'd1 << 13);
      16: t = (32'd1 << 15) | (32'd1 << 14) | (32'd1 << 12) | (32'd1 << 3);
      17: t = (32'd1 << 16) | (32'd1 << 13);
      18: t = (32'd1 << 17) | (32'd1 << 10);
      19: t = (32'd1 << 18) | (32'd1 << 5) | (32'd1 << 1) | (32'd1 << 0);
      20: t = (32'd1 << 19) | (32'd1 << 16);
      21: t = (32'd1 << 20) | (32'd1 << 18);
      22: t = (32'd1 << 21) | (32'd1 << 20);
      23: t = (32'd1 << 22) | (32'd1 << 17);
      24: t = (32'd1 << 23) | (32'd1 << 22) | (32'd1 << 21) | (32'd1 << 16);
      25: t = (32'd1 << 24) | (32'd1 << 21);
      26: t = (32'd1 << 25) | (32'd1 << 5) | (32'd1 << 1) | (32'd1 << 0);
      27: t = (32'd1 << 26) | (32'd1 << 4) | (32'd1 << 1) | (32'd1 << 0);
      28: t = (32'd1 << 27) | (32'd1 << 24);
      29: t = (32'd1 << 28) | (32'd1 << 26);
      30: t = (32'd1 << 29) | (32'd1 << 5) | (32'd1 << 3) | (32'd1 << 0);
      31: t = (32'd1 << 30) | (32'd1 << 27);
      32: t = (32'd1 << 31) | (32'd1 << 21) | (32'd1 << 1) | (32'd1 << 0);
      default: t = (32'd1 << 8) | (32'd1 << 4);
    endcase
    return t;
  endfunction

  // Seed of generator idx for a w-bit LFSR: idx*37 + 1 taken modulo 2^w-1,
  // never zero. 37 is prime to 2^w-1 for the widths used here, so different
  // generators start at different points of the sequence.
  localparam int unsigned SC_SEED_STRIDE = 37;

  function automatic logic [31:0] seed_of(int unsigned idx, int unsigned w);
    longint unsigned m;
    m = (longint'(1) << w) - 1;
    return 32'(((longint'(idx) * SC_SEED_STRIDE) % m) + 1);
  endfunction

endpackage
