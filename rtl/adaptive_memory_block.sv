// adaptive_memory_block: the storage half of every memory stage of the
// transmitter. Two banks of DEPTH words form one memory entity: while the
// stage's controller writes one bank (in any order it likes, which is how the
// reordering stages permute data for free), the other bank, filled earlier,
// is read out. The controller marks the last write of a bank with `wr_last`
// and the last read with `rd_last`; the block keeps a full flag per bank and
// swaps banks on its own.
//   wr_ready   (enable_to_previous_block) high while the bank being written
//              is free; it stays high until that bank has been filled.
//   rd_avail   high while the bank to be read holds a complete data set.
//   rd_data    registered: valid the clock after rd_en.
//   rd_release one-clock pulse after a bank has been read out and freed.
// The document describes the grouping of RAM blocks into one entity with
// simultaneous read and write; the two-bank scheme and the handshake are this
// design's choice.
module adaptive_memory_block #(
  parameter int WIDTH = 64,
  parameter int DEPTH = 1440,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             wr_last,
  output logic             wr_ready,
  output logic             rd_avail,
  output logic             rd_bank,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  input  logic             rd_last,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_release
);
  logic [WIDTH-1:0] mem [2*DEPTH];
  logic [1:0] full;
  logic       wbank, rbank;

  assign wr_ready = !full[wbank];
  assign rd_avail = full[rbank];
  assign rd_bank  = rbank;

  always_ff @(posedge clk) begin
    if (wr_en) mem[(wbank ? DEPTH : 0) + int'(wr_addr)] <= wr_data;
    if (rd_en) rd_data <= mem[(rbank ? DEPTH : 0) + int'(rd_addr)];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      full       <= '0;
      wbank      <= 1'b0;
      rbank      <= 1'b0;
      rd_release <= 1'b0;
    end else begin
      rd_release <= 1'b0;
      if (wr_en && wr_last) begin
        full[wbank] <= 1'b1;
        wbank       <= !wbank;
      end
      if (rd_en && rd_last) begin
        full[rbank] <= 1'b0;
        rbank       <= !rbank;
        rd_release  <= 1'b1;
      end
    end
  end

  a_write_free: assert property (@(posedge clk) disable iff (rst) wr_en |-> wr_ready)
    else $error("write into a full bank");
  a_read_full: assert property (@(posedge clk) disable iff (rst) rd_en |-> rd_avail)
    else $error("read from a bank that is not full");
endmodule
