// Sector buffer: a first-in first-out store of whole sectors, used three times
// in the read channel.
//   * between equalizer and SOVA detector, holding d = 5 sectors of 6-bit
//     samples so that sectors needing extra channel iterations lose no data;
//   * between detector and LDPC decoder (the embedded-DRAM buffer of m
//     sectors), holding the SOVA input sample and soft output of each bit so
//     that the decoder may run slowly at a reduced supply voltage;
//   * as the two-frame buffer for conditional post-processing, holding the
//     6-bit channel samples and the 1-bit hard decisions of one sector.
// The source paper gives the purpose and the capacities of these buffers; the
// interface below is this design's own.
//
// Interface.  Writes are sequential: each wr_en offers one word, and every
// SECTOR_LEN offered words form a sector, committed after its last word.  If
// all slots are in use when the first word of a sector is offered, the whole
// sector is dropped and `overflow` pulses once for each of its words (the
// sector is lost: the buffer-overflow event of the source paper).
// Reads are random access within the oldest committed sector: rd_data shows
// word rd_addr one cycle after the address is applied.  rd_release frees the
// oldest sector.  `count` is the number of committed sectors.
module sector_fifo #(
  parameter int unsigned SECTORS    = 5,
  parameter int unsigned SECTOR_LEN = 4608,
  parameter int unsigned WIDTH      = 6,
  localparam int unsigned AW = $clog2(SECTOR_LEN),
  localparam int unsigned SW = (SECTORS > 1) ? $clog2(SECTORS) : 1,
  localparam int unsigned CW = $clog2(SECTORS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             overflow,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  input  logic             rd_release,
  output logic [CW-1:0]    count,
  output logic             empty,
  output logic             full
);
  logic [WIDTH-1:0] mem [SECTORS * SECTOR_LEN];
  logic [SW-1:0] wr_sec, rd_sec;
  logic [AW-1:0] wr_ptr;
  logic          dropping;     // the sector being offered is dropped
  logic          wr_first, wr_accept, wr_last, do_release;

  assign full      = (count == CW'(SECTORS));
  assign empty     = (count == '0);
  assign wr_first  = (wr_ptr == '0);
  assign wr_accept = wr_en && (wr_first ? !full : !dropping);
  assign wr_last   = wr_accept && (wr_ptr == AW'(SECTOR_LEN - 1));
  assign do_release = rd_release && !empty;

  function automatic logic [SW-1:0] next_sec(logic [SW-1:0] s);
    return (s == SW'(SECTORS - 1)) ? '0 : s + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (wr_accept) mem[int'(wr_sec) * SECTOR_LEN + int'(wr_ptr)] <= wr_data;
    rd_data <= mem[int'(rd_sec) * SECTOR_LEN + int'(rd_addr)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_sec    <= '0;
      rd_sec    <= '0;
      wr_ptr    <= '0;
      dropping  <= 1'b0;
      count     <= '0;
      overflow  <= 1'b0;
    end else begin
      overflow <= wr_en && !wr_accept;
      if (wr_en) begin
        if (wr_first) dropping <= full;
        wr_ptr <= (wr_ptr == AW'(SECTOR_LEN - 1)) ? '0 : wr_ptr + 1'b1;
      end
      if (wr_last) wr_sec <= next_sec(wr_sec);
      if (do_release) rd_sec <= next_sec(rd_sec);
      count <= count + CW'(wr_last) - CW'(do_release);
    end
  end

  // A read address must lie inside the sector.
  assert property (@(posedge clk) disable iff (!rst_n) int'(rd_addr) < SECTOR_LEN);
endmodule
