// victim_select: tag matching and replacement choice for one set of the
// second-level cache.
//
// The directory entries of the set are presented one per clock (entry_valid,
// entry_tag, entry_state, entry_way), the last one with entry_last.  The
// block keeps only two registers, whatever the associativity: the final tag
// match and the best victim so far.  An entry whose state is not INV and
// whose tag equals `tag` is a match and ends the scan.  Otherwise the entry
// competes as a victim by grade, PENDING < RW < RO < INV: a higher grade
// replaces the stored victim, an equal grade replaces it at random (a
// free-running LFSR bit).  `done` pulses for one clock after the match or the
// last entry; with it come hit/hit_way/hit_state, and victim_avail (some
// blockframe is not pending), victim_way and victim_state.  `start` clears
// both registers.
//
// The two registers, the early exit on a match, the grade order and the
// random choice among equal grades follow the replacement flowchart of the
// cache controller.  The streaming interface, the LFSR and the rule that an
// INV blockframe never matches are this design's choices.
module victim_select
  import rpm_pkg::*;
#(
  parameter int unsigned ASSOC = 2,
  parameter int unsigned TAG_W = 12
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  logic [TAG_W-1:0]         tag,
  input  logic                     entry_valid,
  input  logic [TAG_W-1:0]         entry_tag,
  input  slc_state_e               entry_state,
  input  logic [$clog2(ASSOC+1)-1:0] entry_way,
  input  logic                     entry_last,
  output logic                     done,
  output logic                     hit,
  output logic [$clog2(ASSOC+1)-1:0] hit_way,
  output slc_state_e               hit_state,
  output logic                     victim_avail,
  output logic [$clog2(ASSOC+1)-1:0] victim_way,
  output slc_state_e               victim_state
);

  logic              active;
  logic              have_victim;
  logic [1:0]        best_grade;
  logic [7:0]        lfsr;
  logic              match, better;
  logic [1:0]        g;

  assign g      = victim_grade(entry_state);
  assign match  = entry_valid && active && entry_state != SLC_INV && entry_tag == tag;
  assign better = !have_victim || g > best_grade || (g == best_grade && lfsr[0]);

  always_ff @(posedge clk) begin
    if (rst) lfsr <= 8'h5A;
    else     lfsr <= {lfsr[6:0], lfsr[7] ^ lfsr[5] ^ lfsr[4] ^ lfsr[3]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      active       <= 1'b0;
      done         <= 1'b0;
      hit          <= 1'b0;
      hit_way      <= '0;
      hit_state    <= SLC_INV;
      have_victim  <= 1'b0;
      best_grade   <= '0;
      victim_way   <= '0;
      victim_state <= SLC_INV;
    end else begin
      done <= 1'b0;
      if (start) begin
        active      <= 1'b1;
        hit         <= 1'b0;
        have_victim <= 1'b0;
        best_grade  <= '0;
      end else if (entry_valid && active) begin
        if (match) begin
          hit       <= 1'b1;
          hit_way   <= entry_way;
          hit_state <= entry_state;
          active    <= 1'b0;
          done      <= 1'b1;
        end else begin
          if (better) begin
            have_victim  <= 1'b1;
            best_grade   <= g;
            victim_way   <= entry_way;
            victim_state <= entry_state;
          end
          if (entry_last) begin
            active <= 1'b0;
            done   <= 1'b1;
          end
        end
      end
    end
  end

  assign victim_avail = have_victim && best_grade != 2'd0;

endmodule
