// prbs_pn15: the transmitter's data source, a PN15 pseudo-random bit generator
// (x^15 + x^14 + 1, the ITU-T O.150 PN15 polynomial). One bit per clock while
// `en` is high, so the chain downstream sees one new bit every cycle at full
// rate. `load` puts the seed back; the transmitter pulses it at every frame
// start so each frame carries the same 132480-bit sequence (46 symbols x 2880
// bits). Output bit is the register's MSB; it changes on the clock after `en`.
// The document names PN15; the seed and the per-frame restart are this
// design's choice.
module prbs_pn15 #(
  parameter logic [14:0] SEED = 15'h7FFF
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic load,
  output logic bit_o
);
  logic [14:0] sr;

  always_ff @(posedge clk) begin
    if (rst || load) sr <= SEED;
    else if (en)     sr <= {sr[13:0], sr[14] ^ sr[13]};
  end

  assign bit_o = sr[14];
endmodule
