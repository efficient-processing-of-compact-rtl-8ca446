// adder_tree: sums N signed products in a balanced binary tree.
//
// Every multiplier vector of the convolution engines feeds such a tree. The
// tree is built level by level: level 0 holds the inputs, and each entry of
// level l+1 is the sum of two neighbouring entries of level l (an odd entry
// at the end is passed on unchanged), so the sum appears after ceil(log2 N)
// adder levels. It is combinational; the engines register its result in
// their accumulator or output register. Output width is the accumulator
// width. Whether the tree is pipelined is not fixed by the architecture
// description; this version is not.
module adder_tree
  import fibha_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  acc_t [N-1:0] in,
  output acc_t         sum
);
  localparam int unsigned LV = (N > 1) ? $clog2(N) : 0;

  acc_t lvl [LV+1][N];

  always_comb begin
    for (int i = 0; i < N; i++) lvl[0][i] = in[i];
    for (int l = 0; l < LV; l++) begin
      int unsigned cnt;
      cnt = (N + (1 << l) - 1) >> l;   // entries alive at level l
      for (int i = 0; i < N; i++) begin
        if (2 * i + 1 < cnt)  lvl[l+1][i] = lvl[l][2*i] + lvl[l][2*i+1];
        else if (2 * i < cnt) lvl[l+1][i] = lvl[l][2*i];
        else                  lvl[l+1][i] = '0;
      end
    end
    sum = lvl[LV][0];
  end
endmodule
