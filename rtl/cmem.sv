// cmem: column memory of the spatial processor, six buffers of N/2 words.
//
// For each of the two bands produced by the row processor (l and h) it keeps, per
// column, the three results a column slice hands to the next one: d1[i-1], s1[i-1] and
// d2[i-2]. Together with the four row buffers this is the 10 x N/2 words of line storage
// of the spatial processor.
//
// Interface: asynchronous read of the three words of (rd_band, rd_addr); the write port
// stores d1/s1 when we_h1 is set and d2 when we_h2 is set, at (wr_band, wr_addr), at the
// clock edge. A word is read again only after its write-back, two rows later.
// The six-buffer organisation follows the published design; the port arrangement is this
// design's choice.
module cmem
  import dwt_pkg::*;
#(
  parameter int unsigned N = 256
) (
  input  logic                   clk,
  input  logic                   rd_band,
  input  logic [$clog2(N/2)-1:0] rd_addr,
  output coef_t                  rd_d1,
  output coef_t                  rd_s1,
  output coef_t                  rd_d2,
  input  logic                   we_h1,
  input  logic                   we_h2,
  input  logic                   wr_band,
  input  logic [$clog2(N/2)-1:0] wr_addr,
  input  coef_t                  wr_d1,
  input  coef_t                  wr_s1,
  input  coef_t                  wr_d2
);

  localparam int unsigned D = N / 2;

  coef_t ram_d1 [2][D];
  coef_t ram_s1 [2][D];
  coef_t ram_d2 [2][D];

  assign rd_d1 = ram_d1[rd_band][rd_addr];
  assign rd_s1 = ram_s1[rd_band][rd_addr];
  assign rd_d2 = ram_d2[rd_band][rd_addr];

  always_ff @(posedge clk) begin
    if (we_h1) begin
      ram_d1[wr_band][wr_addr] <= wr_d1;
      ram_s1[wr_band][wr_addr] <= wr_s1;
    end
    if (we_h2) ram_d2[wr_band][wr_addr] <= wr_d2;
  end

endmodule
