// approx_adder_tree - sums the partial products of a MAC through adder steps.
//
// NLEAF signed W-bit inputs are added pairwise, level by level, by
// approx_addsub units: level l holds ceil(NLEAF / 2^l) values, and an odd value
// at the end of a level is passed on to the next level unchanged. Every adder of
// level l is configured with the same number of approximate bits, AP[l]
// (entry [0] is the first level of this tree), which is the per-adder-step
// configuration the synthesis flow searches. Nine leaves give four levels and
// 25 leaves five, i.e. FAS = 5 and 6 for the 3x3 and 5x5 MACs once the neurons'
// own adders are counted. The pairing order is this design's choice.
//
// Purely combinational.
module approx_adder_tree
  import approx_pkg::*;
#(
  parameter int unsigned NLEAF = 9,
  parameter int unsigned W     = 20,
  parameter ap_vec_t     AP    = AP_MAC3 >> AP_BITS   // tree levels of the 3x3 MAC
) (
  input  logic [NLEAF-1:0][W-1:0] leaf,
  output logic [W-1:0]            sum
);

  localparam int unsigned L = tree_levels(NLEAF);

  // values alive at the start of level l
  function automatic int unsigned count(input int unsigned l);
    int unsigned m = NLEAF;
    for (int unsigned i = 0; i < l; i++) m = (m + 1) / 2;
    return m;
  endfunction

  // one vector per level, so no signal feeds itself
  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned NIN  = count(l);
    localparam int unsigned NOUT = count(l + 1);
    logic [NIN-1:0][W-1:0]  vin;
    logic [NOUT-1:0][W-1:0] vout;
    if (l == 0) begin : g_first
      assign vin = leaf;
    end else begin : g_next
      assign vin = g_lvl[l-1].vout;
    end
    for (genvar i = 0; i < NOUT; i++) begin : g_node
      if (2 * i + 1 < NIN) begin : g_add
        approx_addsub #(.N(W), .AP(int'(AP[l]))) u_add (
          .a(vin[2*i]), .b(vin[2*i+1]), .sub(1'b0), .y(vout[i])
        );
      end else begin : g_pass
        assign vout[i] = vin[2*i];
      end
    end
  end

  if (L == 0) begin : g_single
    assign sum = leaf[0];
  end else begin : g_root
    assign sum = g_lvl[L-1].vout[0];
  end

endmodule
