// ps_converter: parallel to serial converter for the decoded data.
//
// Each decoded symbol carries 4 bits. On in_valid they are loaded into a
// shift register and sent most significant bit first, one bit every
// BIT_TICKS master clock ticks, the first one clock after the load. With
// 32 ticks per symbol and BIT_TICKS = 8 the serial rate is four times the
// symbol rate: 10.8 Mbit/s at 2.7 Mbaud. A new symbol arriving before all
// bits are out restarts the register. `clear` drops what is left.
// The converter follows the published receiver; its timing is this design's.
module ps_converter #(
  parameter int BIT_TICKS = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       in_valid,
  input  logic [3:0] bits,
  output logic       bit_valid,
  output logic       bit_out
);

  logic [3:0] sh;
  logic [2:0] left;
  logic [7:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh        <= '0;
      left      <= '0;
      cnt       <= '0;
      bit_valid <= 1'b0;
      bit_out   <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      if (clear) left <= '0;
      else if (in_valid) begin
        sh   <= bits;
        left <= 3'd4;
        cnt  <= '0;
      end else if (left != 0) begin
        if (cnt == 0) begin
          bit_out   <= sh[3];
          bit_valid <= 1'b1;
          sh        <= {sh[2:0], 1'b0};
          left      <= left - 1'b1;
          cnt       <= 8'(BIT_TICKS - 1);
        end else cnt <= cnt - 1'b1;
      end
    end
  end

endmodule
