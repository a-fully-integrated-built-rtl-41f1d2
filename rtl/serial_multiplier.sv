// Serial (shift-and-add) unsigned multiplier, W x W -> 2W bits.
//
// start loads the operands; one multiplier bit is processed per clock, so
// the product is ready W clocks later, when done pulses for one cycle and
// p holds the result (until the next start). busy is high while working.
// Used by the power estimator, whose input arrives only once every OSR
// clocks, so a parallel multiplier is not needed.
module serial_multiplier #(
  parameter int W = 24
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic           busy,
  output logic           done,
  output logic [2*W-1:0] p
);

  logic [2*W-1:0]       mcand;
  logic [W-1:0]         mplier;
  logic [$clog2(W+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mcand  <= '0;
      mplier <= '0;
      cnt    <= '0;
      p      <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        mcand  <= (2*W)'(a);
        mplier <= b;
        p      <= '0;
        cnt    <= ($clog2(W+1))'(W);
        busy   <= 1'b1;
      end else if (busy) begin
        if (mplier[0]) p <= p + mcand;
        mcand  <= mcand << 1;
        mplier <= mplier >> 1;
        cnt    <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
