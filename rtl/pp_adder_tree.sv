// pp_adder_tree: partial product addition stage built from Han-Carlson adders.
//
// The ROWS operand rows (weighted partial products and the correction term)
// are summed modulo 2^W by a balanced binary tree of han_carlson_adder
// instances. Nodes are numbered as a heap: leaves ROWS-1 .. 2*ROWS-2 hold the
// rows, internal node m adds its children 2m+1 and 2m+2, and node 0 is the
// result. With ROWS = 5 (an 8-bit multiplier) that is four adders on three
// levels. Using Han-Carlson adders for the partial product addition follows
// the proposed architecture; the tree shape is this design's own choice.
//
// Interface: rows in, sum out. Combinational.
module pp_adder_tree #(
  parameter int unsigned ROWS = 5,
  parameter int unsigned W    = 16
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum
);

  localparam int unsigned NODES = 2 * ROWS - 1;

  logic [W-1:0] node [NODES];

  for (genvar r = 0; r < ROWS; r++) begin : g_leaf
    assign node[ROWS-1+r] = rows[r];
  end

  for (genvar m = 0; m < ROWS - 1; m++) begin : g_add
    logic unused_cout;
    han_carlson_adder #(.W(W)) u_hca (
      .a    (node[2*m+1]),
      .b    (node[2*m+2]),
      .cin  (1'b0),
      .sum  (node[m]),
      .cout (unused_cout)
    );
  end

  assign sum = node[0];

  initial begin
    assert (ROWS >= 2) else $error("pp_adder_tree: ROWS must be at least 2");
  end

endmodule
