// wallace_tree: reduces N partial-product rows to two rows.
//
// The rows are compressed in layers. In each layer the rows are taken three at
// a time into 3:2 compressors (a full adder per bit position), each giving a
// sum row and a carry row; the one or two rows left over pass to the next layer
// unchanged. A layer turns n rows into 2*floor(n/3) + n mod 3, so the number of
// layers grows with the logarithm of N. The two rows that remain are added by
// the final carry look-ahead adder outside this module. Layered 3:2 reduction
// is the Wallace scheme; grouping whole rows (rather than column by column) is
// this design's choice.
//
// Interface: rows (N rows of W bits) in; sum_row and carry_row (W bits) out,
// with sum_row + carry_row == sum of rows (mod 2**W). Purely combinational.
module wallace_tree #(
  parameter int N = 5,
  parameter int W = 8
) (
  input  logic [W-1:0] rows [N],
  output logic [W-1:0] sum_row,
  output logic [W-1:0] carry_row
);
  // number of rows after lvl layers of reduction
  function automatic int rows_at(int n, int lvl);
    int r = n;
    for (int l = 0; l < lvl; l++) r = 2 * (r / 3) + (r % 3);
    return r;
  endfunction

  // number of layers needed to get down to two rows
  function automatic int num_levels(int n);
    int r = n;
    int l = 0;
    while (r > 2) begin
      r = 2 * (r / 3) + (r % 3);
      l++;
    end
    return l;
  endfunction

  localparam int LEVELS = num_levels(N);

  // Each layer keeps its rows in its own array (lvl_in -> lvl_out), so the
  // layers form a plain feed-forward chain.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int NIN  = rows_at(N, l);
    localparam int NG   = NIN / 3;
    localparam int NREM = NIN % 3;
    localparam int NOUT = 2 * NG + NREM;

    logic [W-1:0] lvl_in  [NIN];
    logic [W-1:0] lvl_out [NOUT];

    if (l == 0) begin : g_first
      assign lvl_in = rows;
    end else begin : g_next
      assign lvl_in = g_level[l-1].lvl_out;
    end

    for (genvar g = 0; g < NG; g++) begin : g_csa
      csa_3to2 #(.W(W)) u_csa (
        .a    (lvl_in[3*g]),
        .b    (lvl_in[3*g+1]),
        .c    (lvl_in[3*g+2]),
        .sum  (lvl_out[2*g]),
        .carry(lvl_out[2*g+1])
      );
    end
    for (genvar r = 0; r < NREM; r++) begin : g_pass
      assign lvl_out[2*NG+r] = lvl_in[3*NG+r];
    end
  end

  if (LEVELS == 0 && N == 1) begin : g_one
    assign sum_row   = rows[0];
    assign carry_row = '0;
  end else if (LEVELS == 0) begin : g_two
    assign sum_row   = rows[0];
    assign carry_row = rows[1];
  end else begin : g_tree
    assign sum_row   = g_level[LEVELS-1].lvl_out[0];
    assign carry_row = g_level[LEVELS-1].lvl_out[1];
  end
endmodule
