// sc_expr_datapath: stochastic datapath described by a node list.
//
// A mathematical expression is given in postfix (RPN) form, split into
// partial computations: node j applies one operator (sum as average, product,
// negation, square, complement) to up to SC_MAX_ARGS operands. Operands index
// a signal vector that holds the N_IN input streams first and then the
// outputs of nodes 0..N_NODES-1, so a node may use any input or any earlier
// node. OUTS picks the signals that leave the datapath. Each node becomes one
// stochastic unit with exactly as many inputs as it has operands
// (sc_add/sc_mul are generated n-ary), so the circuit has the same regular
// form for any expression.
//
// The default program has two outputs. Output 0 is the framework's example
//   func = (i0*i1 + i2*i3*i4) / 2        (aux0 = i0*i1, aux1 = i2*i3*i4)
// where the division is the averaging of the 2-input stochastic adder.
// Output 1 is this design's own expression that exercises the remaining
// operators:  g = (i0^2 * (1 - i1) + (1 - i2)) / 2.
// Sequential units (adders, squarers) run on clk and clear on rst; each adder
// adds one clock of latency.
module sc_expr_datapath
  import sc_pkg::*;
#(
  parameter int unsigned N_IN    = 5,
  parameter int unsigned N_NODES = 8,
  parameter int unsigned N_OUT   = 2,
  parameter bit          BIPOLAR = 1'b0,
  parameter sc_node_t [N_NODES-1:0] NODES = {
    sc_node(OP_ADD,  2, 10, 11),    // 7: g    = (s10 + s11)/2   -> sig 12
    sc_node(OP_NEG,  1, 2),         // 6: 1-i2                    -> sig 11
    sc_node(OP_MUL,  2, 8, 9),      // 5: i0^2 * (1-i1)           -> sig 10
    sc_node(OP_NOT,  1, 1),         // 4: 1-i1                    -> sig 9
    sc_node(OP_POW2, 1, 0),         // 3: i0^2                    -> sig 8
    sc_node(OP_ADD,  2, 5, 6),      // 2: func = (aux0 + aux1)/2  -> sig 7
    sc_node(OP_MUL,  3, 2, 3, 4),   // 1: aux1 = i2*i3*i4         -> sig 6
    sc_node(OP_MUL,  2, 0, 1)       // 0: aux0 = i0*i1            -> sig 5
  },
  parameter logic [N_OUT-1:0][SC_IDX_W-1:0] OUTS = {8'd12, 8'd7}
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [N_IN-1:0]  in_s,
  output logic [N_OUT-1:0] out_s
);

  localparam int unsigned N_SIG = N_IN + N_NODES;

  logic [N_IN-1:0]    sig_in;
  logic [N_NODES-1:0] sig_node;

  assign sig_in = in_s;

  for (genvar j = 0; j < N_NODES; j++) begin : g_node
    localparam sc_op_e      OP = NODES[j].op;
    localparam int unsigned NA = int'(NODES[j].nargs);

    if (NA < 1 || NA > SC_MAX_ARGS) begin : g_bad_arity
      $error("node %0d: operand count %0d out of range", j, NA);
    end
    if ((OP == OP_NEG || OP == OP_NOT || OP == OP_POW2) && NA != 1) begin : g_bad_unary
      $error("node %0d: unary operator with %0d operands", j, NA);
    end

    // Gather this node's operands; they may only be inputs or earlier nodes.
    logic [NA-1:0] opnd;
    for (genvar m = 0; m < NA; m++) begin : g_arg
      localparam int unsigned IDX = int'(NODES[j].args[m]);
      if (IDX >= N_IN + j) begin : g_bad_ref
        $error("node %0d operand %0d refers to signal %0d, not yet defined", j, m, IDX);
      end else if (IDX < N_IN) begin : g_from_in
        assign opnd[m] = sig_in[IDX];
      end else begin : g_from_node
        assign opnd[m] = sig_node[IDX - N_IN];
      end
    end

    if (OP == OP_ADD) begin : g_add
      sc_add #(.N(NA)) u_unit (.clk(clk), .rst(rst), .a(opnd), .y(sig_node[j]));
    end else if (OP == OP_MUL) begin : g_mul
      sc_mul #(.N(NA), .BIPOLAR(BIPOLAR)) u_unit (.a(opnd), .y(sig_node[j]));
    end else if (OP == OP_POW2) begin : g_pow2
      sc_pow2 #(.BIPOLAR(BIPOLAR)) u_unit (.clk(clk), .rst(rst), .a(opnd[0]), .y(sig_node[j]));
    end else begin : g_not
      sc_not u_unit (.a(opnd[0]), .y(sig_node[j]));
    end
  end

  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    localparam int unsigned IDX = int'(OUTS[o]);
    if (IDX >= N_SIG) begin : g_bad_out
      $error("output %0d refers to signal %0d, out of range", o, IDX);
    end else if (IDX < N_IN) begin : g_from_in
      assign out_s[o] = sig_in[IDX];
    end else begin : g_from_node
      assign out_s[o] = sig_node[IDX - N_IN];
    end
  end

endmodule
