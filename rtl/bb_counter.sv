// bb_counter -- BBCounter: number of instructions decoded since the last branch.
//
// Each valid decoded instruction either clears the counter (a branch) or
// increments it (any other instruction). The value seen while a branch is being
// decoded is therefore the size of the basic block that ends at that branch,
// counted from the successor of the previous branch. `count` is the registered
// value; it saturates at all ones instead of wrapping.
// From the document: INC on non-branch, CLR on branch. Saturation, the width
// and the asynchronous active-low reset are this design's choices.
module bb_counter #(
  parameter int unsigned BBSIZE_W = 9
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                dec_valid,
  input  logic                dec_is_branch,
  output logic [BBSIZE_W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      count <= '0;
    else if (dec_valid) begin
      if (dec_is_branch)             count <= '0;
      else if (count != '1)          count <= count + 1'b1;
    end
  end

endmodule
