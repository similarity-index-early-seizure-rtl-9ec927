// sid_block_avg: block average of a signed stream with one adder and one
// stored result.
//
// Input values are summed in an accumulator; after M = 2**m_log2 values the
// sum is divided by M (an arithmetic shift) and stored in the result
// register, and the accumulator starts over. The result is therefore the
// mean of the last complete block of M values and is refreshed once per
// block. This is how the running mean (and, fed with deviations, the
// variance) is formed with a single adder and a memory element rather than
// a buffer of M past values.
//
// Interface: in_valid/in in; avg holds the last block mean, avg_valid goes
// high after the first block and stays high, upd pulses in the cycle after
// the block's last value. m_log2 is meant to be static; if it changes, the
// current block ends as soon as its count reaches the new length (a block
// that had already grown past a new, shorter length ends with its next
// value, and its sum is still divided by the new length).
module sid_block_avg #(
  parameter int unsigned IN_W       = 9,
  parameter int unsigned M_LOG2_MAX = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [3:0]             m_log2,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in,
  output logic signed [IN_W-1:0] avg,
  output logic                   avg_valid,
  output logic                   upd
);

  localparam int unsigned SUM_W = IN_W + M_LOG2_MAX;

  logic signed [SUM_W-1:0] sum, sum_next;
  logic [M_LOG2_MAX:0]     count;
  logic                    close;

  always_comb begin
    sum_next = sum + SUM_W'(in);
    close    = ({1'b0, count} + 1'b1) >= ((M_LOG2_MAX + 2)'(1) << m_log2);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum       <= '0;
      count     <= '0;
      avg       <= '0;
      avg_valid <= 1'b0;
      upd       <= 1'b0;
    end else begin
      upd <= 1'b0;
      if (in_valid) begin
        if (close) begin
          avg       <= IN_W'(sum_next >>> m_log2);
          avg_valid <= 1'b1;
          upd       <= 1'b1;
          sum       <= '0;
          count     <= '0;
        end else begin
          sum   <= sum_next;
          count <= count + 1'b1;
        end
      end
    end
  end

  initial assert (M_LOG2_MAX <= 14)
    else $error("sid_block_avg: M_LOG2_MAX too large for the 4-bit m_log2 input");

endmodule
