// slice_sched: the counter-driven part of the controller that turns a position in the
// slice schedule into the enables and mirror selects of one lifting slice.
//
// All three processors (row, column, temporal) step through their sequence one slice per
// input pair and run the same schedule. At position j of the current sequence (j counts
// input pairs: pixel pairs of a row, row pairs of a frame, frame pairs of a video):
//   j = 0 : first half closes the previous sequence (its last slice, x[2n] := x[2n-2]);
//           second half yields output n-2 of the previous sequence.
//   j = 1 : first half opens the current sequence (slice 0, d1[-1] := d1[0]);
//           second half yields the previous sequence's last output (s1[n] := s1[n-1]).
//   j >= 2: slice j-1 and output j-2 of the current sequence (d2[-1] := d2[0] at j = 2).
// Sequences therefore follow each other with no idle slot; before the first sequence and
// after the last one, the halves that belong to a missing sequence are disabled
// (prev_exists / cur_exists). A sequence must hold at least two input pairs.
//
// Purely combinational. The overlapped closing/opening of sequences follows the published
// processor scheduling; expressing it as one shared table is this design's choice.
module slice_sched
  import dwt_pkg::*;
(
  input  logic       pos_is0,      // j == 0
  input  logic       pos_is1,      // j == 1
  input  logic       pos_is2,      // j == 2
  input  logic       prev_exists,  // a previous sequence is still to be closed
  input  logic       cur_exists,   // the current position carries real input
  input  logic       prev_n_is2,   // the previous sequence held exactly two input pairs
  output slice_ctl_t ctl
);

  always_comb begin
    ctl = SLICE_IDLE;
    if (pos_is0) begin
      ctl.h1_valid  = prev_exists;
      ctl.p1_last   = 1'b1;
      ctl.h2_valid  = prev_exists;
      ctl.u2_second = prev_n_is2;
    end else if (pos_is1) begin
      ctl.h1_valid  = cur_exists;
      ctl.u1_first  = 1'b1;
      ctl.h2_valid  = prev_exists;
      ctl.p2_flush  = 1'b1;
    end else begin
      ctl.h1_valid  = cur_exists;
      ctl.h2_valid  = cur_exists;
      ctl.u2_second = pos_is2;
    end
  end

endmodule
