// tmem: temporal memory, three frame buffers of N*ROWS words (N pixels per
// row, ROWS rows per frame).
//
// For every pixel position the temporal processor keeps the three results one temporal
// slice hands to the next (d1[i-1], s1[i-1], d2[i-2]), one frame buffer each. Addressing
// is serial: pixel t of a phase is read at clock t of the phase and written back at the
// end of the lifting pipeline, and read again one phase (N*ROWS clocks) later.
//
// Interface: asynchronous read at rd_addr; d1/s1 are written when we_h1 is set and d2
// when we_h2 is set, at wr_addr, at the clock edge.
// The three frame buffers and their serial addressing follow the published design.
module tmem
  import dwt_pkg::*;
#(
  parameter int unsigned N    = 256,   // pixels per row
  parameter int unsigned ROWS = N      // rows per frame
) (
  input  logic                   clk,
  input  logic [$clog2(N*ROWS)-1:0] rd_addr,
  output coef_t                  rd_d1,
  output coef_t                  rd_s1,
  output coef_t                  rd_d2,
  input  logic                   we_h1,
  input  logic                   we_h2,
  input  logic [$clog2(N*ROWS)-1:0] wr_addr,
  input  coef_t                  wr_d1,
  input  coef_t                  wr_s1,
  input  coef_t                  wr_d2
);

  localparam int unsigned M = N * ROWS;

  coef_t buf_d1 [M];
  coef_t buf_s1 [M];
  coef_t buf_d2 [M];

  assign rd_d1 = buf_d1[rd_addr];
  assign rd_s1 = buf_s1[rd_addr];
  assign rd_d2 = buf_d2[rd_addr];

  always_ff @(posedge clk) begin
    if (we_h1) begin
      buf_d1[wr_addr] <= wr_d1;
      buf_s1[wr_addr] <= wr_s1;
    end
    if (we_h2) buf_d2[wr_addr] <= wr_d2;
  end

endmodule
