// qpsk_mapper: packs the serial bit stream (one bit per clock) into QPSK
// symbols, one symbol every two bits. The first bit of a pair sets the sign
// of I, the second the sign of Q (0 -> +AMP, 1 -> -AMP), the Gray mapping of
// IEEE 802.16e. The symbol appears, registered, on the clock after its second
// bit. `clr` drops a half-collected pair (used at frame starts). The document
// gives QPSK and the bit/symbol rate; the amplitude is this design's choice,
// low enough that 4/3-boosted pilots still fit in 16 bits.
module qpsk_mapper
  import wimax_pkg::*;
#(
  parameter int AMP = 16384
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  clr,
  input  logic  bit_valid,
  input  logic  bit_i,
  output logic  sym_valid,
  output cplx_t sym
);
  logic have_first;
  logic first_bit;

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      have_first <= 1'b0;
      first_bit  <= 1'b0;
      sym_valid  <= 1'b0;
      sym        <= '0;
    end else begin
      sym_valid <= 1'b0;
      if (bit_valid) begin
        if (!have_first) begin
          have_first <= 1'b1;
          first_bit  <= bit_i;
        end else begin
          have_first <= 1'b0;
          sym_valid  <= 1'b1;
          sym.re     <= first_bit ? 16'(-AMP) : 16'(AMP);
          sym.im     <= bit_i     ? 16'(-AMP) : 16'(AMP);
        end
      end
    end
  end
endmodule
