// diff_decoder: differential decoder that removes the four-fold phase
// ambiguity of the recovered carrier.
//
// The coarse phase loop locks to any of four positions 90 degrees apart, so
// the absolute quadrant of a symbol is unknown while the change of quadrant
// from one symbol to the next is not. Each decided symbol gives a quadrant
// index q (0: +I+Q, 1: -I+Q, 2: -I-Q, 3: +I-Q, counter-clockwise); the two
// most significant output bits are (q - q_prev) mod 4. The two other bits
// say which axis is on the outer level; in odd quadrants they are swapped,
// which makes them the same for a point and its 90-degree rotations. The
// first reference q_prev is the last preamble symbol (`load_ref`).
//
// Output bits = {dq[1:0], outer bit 1, outer bit 0}, one clock after
// in_valid. Differential decoding after the decision follows the published
// receiver; the bit mapping is this design's choice.
module diff_decoder
  import qam_rx_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       load_ref,
  input  qam_sym_t   ref_sym,
  input  logic       in_valid,
  input  qam_sym_t   sym,
  output logic       out_valid,
  output logic [3:0] bits
);

  logic [1:0] q_prev;

  function automatic logic [1:0] quadrant(input qam_sym_t s);
    unique case ({s.si, s.sq})
      2'b00:   return 2'd0;
      2'b10:   return 2'd1;
      2'b11:   return 2'd2;
      default: return 2'd3;
    endcase
  endfunction

  logic [1:0] q;
  assign q = quadrant(sym);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_prev    <= '0;
      bits      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (clear) q_prev <= '0;
      else if (load_ref) q_prev <= quadrant(ref_sym);
      else if (in_valid) begin
        bits      <= {q - q_prev, q[0] ? {sym.oq, sym.oi} : {sym.oi, sym.oq}};
        out_valid <= 1'b1;
        q_prev    <= q;
      end
    end
  end

endmodule
