// rmem: row memory of the spatial processor, four line buffers R1..R4 of N/2 words.
//
// The buffers hold the low (l) and high (h) halves of the two most recent row-transformed
// rows. Four role pointers name the buffer holding l and h of the older (even, "e") and
// newer (odd, "o") row. On a beat of an even row the column processor reads l_e and l_o
// (the new l row arrives online) and the arriving l and h take the two freed words. On a
// beat of an odd row it reads h_e, h_o and the h row stored during the even row, and the
// arriving l and h take the words of h_e and h_o. After each odd row the roles of l_o and
// h_e swap, so the buffer pairs refreshed repeat every four rows (R1/R3, R2/R4, R1/R2,
// R3/R4, ...) and no word ever holds data that is no longer needed: 4 x N/2 words in all.
//
// Interface: one access per beat, in column order; rd0/rd1/rd2 are the contents before the
// beat's write (read-before-write), available in the same clock (asynchronous read).
// The buffer organisation and refresh order follow the published row memory; the
// asynchronous read port is this design's choice.
module rmem
  import dwt_pkg::*;
#(
  parameter int unsigned N = 256
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       beat,     // one column of one row passes
  input  logic                       row_odd,  // the beat belongs to an odd row
  input  logic                       row_end,  // last column of the row
  input  logic [$clog2(N/2)-1:0]     addr,     // column index
  input  coef_t                      wr_l,     // arriving l coefficient
  input  coef_t                      wr_h,     // arriving h coefficient
  output coef_t                      rd0,      // even row: l_e   odd row: h_e
  output coef_t                      rd1,      // even row: l_o   odd row: h_o
  output coef_t                      rd2       // odd row: h of the row stored last
);

  localparam int unsigned D = N / 2;

  coef_t ram [4][D];

  logic [1:0] le_q, lo_q, he_q, ho_q;   // buffer holding each role

  logic [1:0] ra, rb, wa, wb;
  assign ra = row_odd ? he_q : le_q;
  assign rb = row_odd ? ho_q : lo_q;
  assign wa = ra;
  assign wb = rb;

  assign rd0 = ram[ra][addr];
  assign rd1 = ram[rb][addr];
  assign rd2 = ram[lo_q][addr];

  always_ff @(posedge clk) begin
    if (beat) begin
      ram[wa][addr] <= wr_l;
      ram[wb][addr] <= wr_h;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      le_q <= 2'd0;   // R1: l of row 0
      lo_q <= 2'd1;   // R2: h of row 0
      he_q <= 2'd2;   // R3: l of row 1
      ho_q <= 2'd3;   // R4: h of row 1
    end else if (beat && row_odd && row_end) begin
      lo_q <= he_q;
      he_q <= lo_q;
    end
  end

  initial assert (D >= 2) else $error("rmem: N must be at least 4");

endmodule
