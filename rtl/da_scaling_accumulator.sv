// da_scaling_accumulator: shift-and-add accumulator of a DA filter.
//
// Each enabled cycle takes BPC table words, the partial products of bit
// positions t*BPC .. t*BPC+BPC-1 of the tap words, least significant first.
// The running sum is shifted right by BPC (the 2^-1 feedback, BPC times) and
// each table word is added at weight 2^(X_W-BPC+j). A word whose 'sub' flag
// is set is subtracted instead: that is the sign bit of two's-complement
// samples. Because the words enter at the top of the register and the sum
// only moves right, the bits that fall off are always zero and the result
// after X_W/BPC cycles is exact:
//   acc = sum_b (+/-) word_b * 2^b.
// 'clear' starts a new result (the old sum is dropped in the same cycle).
//
// Timing: acc is a register updated on the rising edge when en is high.
// Synchronous active-low reset.
//
// The right shift by one bit per step and the subtraction of the sign-bit
// word follow the source design; entering the words at the top of the
// register, so that nothing is rounded, is a choice made here.
module da_scaling_accumulator #(
  parameter int IN_W  = 6,
  parameter int X_W   = 8,
  parameter int BPC   = 1,
  parameter int ACC_W = IN_W + X_W + 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  input  logic                         clear,
  input  logic [BPC-1:0][IN_W-1:0]     partial,
  input  logic [BPC-1:0]               sub,
  output logic signed [ACC_W-1:0]      acc
);

  logic signed [ACC_W-1:0] acc_next;
  logic signed [ACC_W-1:0] term;

  always_comb begin
    if (clear) acc_next = '0;
    else       acc_next = acc >>> BPC;
    term     = '0;
    for (int j = 0; j < BPC; j++) begin
      term = ACC_W'($signed(partial[j])) <<< (X_W - BPC + j);
      if (sub[j]) acc_next = acc_next - term;
      else        acc_next = acc_next + term;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= acc_next;
  end

endmodule
