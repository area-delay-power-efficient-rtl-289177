// bzfmd_mult: sequential Bypass-Zero, Feed-Multiplicand-Directly (BZ-FMD)
// shift-add multiplier, unsigned PW x MW bits -> PW+MW bits.
//
// The multiplier operand is captured in a register at start and is never shifted:
// a synchronous binary counter in the controller selects bit cnt of it in each
// cycle. The feeder register holds the upper PW bits of the running partial
// product. In every cycle the PW-bit MCLA adds the multiplicand to the feeder
// register, and a multiplexer, steered by the selected multiplier bit, passes
// either that (PW+1)-bit sum or, for a '0' bit, the feeder value unchanged (the
// adder result is bypassed). Bit 0 of the mux output, PP(0), is final: it is
// written straight into bit cnt of the product register's lower half, so the
// lower half of the product is never shifted. Bits PW..1, PP(p to 1), return to
// the feeder register, which is the only part that shifts right. After MW cycles
// the feeder value forms the upper half of the product register.
//
// Interface and timing: pulse start while busy is low; multiplier is sampled at
// that edge. The multiplicand goes straight to the adder, as in the reference
// structure, so it must stay stable until done. busy is high for MW cycles; done
// is high for one cycle after the last step, and product then stays valid until
// the next start. One product takes MW+1 cycles including the start cycle.
// The structure (adder, mux, feeder, product and multiplier registers, binary
// counter) follows the reference design; the start/busy/done handshake and the
// asynchronous active-low reset are this design's choices.
module bzfmd_mult #(
  parameter int unsigned PW = 8,  // multiplicand width p
  parameter int unsigned MW = 8   // multiplier width m
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [PW-1:0]     multiplicand,
  input  logic [MW-1:0]     multiplier,
  output logic              busy,
  output logic              done,
  output logic [PW+MW-1:0]  product
);

  localparam int unsigned CW = (MW > 1) ? $clog2(MW) : 1;

  logic [MW-1:0] mreg;      // multiplier register
  logic [CW-1:0] cnt;       // binary counter of the controller
  logic [PW-1:0] feeder;    // feeder register (upper partial product)
  logic [PW-1:0] sum;
  logic          sum_co;
  logic [PW:0]   mux_out;
  logic          mbit;
  logic [MW-1:0] prod_lo;   // product register, lower half (never shifted)
  logic [PW-1:0] prod_hi;   // product register, upper half

  assign product = {prod_hi, prod_lo};

  mcla #(.W(PW)) u_add (
    .a    (multiplicand),
    .b    (feeder),
    .s    (sum),
    .cout (sum_co)
  );

  always_comb begin
    mbit    = mreg[cnt];
    mux_out = mbit ? {sum_co, sum} : {1'b0, feeder};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mreg    <= '0;
      cnt     <= '0;
      feeder  <= '0;
      prod_lo <= '0;
      prod_hi <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          mreg   <= multiplier;
          cnt    <= '0;
          feeder <= '0;
          busy   <= 1'b1;
        end
      end else begin
        feeder       <= mux_out[PW:1];
        prod_lo[cnt] <= mux_out[0];
        if (cnt == CW'(MW - 1)) begin
          prod_hi <= mux_out[PW:1];
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  // done marks the end of a multiplication, never a cycle in which it runs
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);

endmodule
