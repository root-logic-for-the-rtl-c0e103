// gfilter: stability filter for the downward command at the lowest root
// level.  A new downward command is passed towards the nodes only once it has
// been sampled unchanged in NSTAB consecutive RCLK cycles; until then the
// previous output is held.  This removes short glitches and the skew between
// the wires of a multi-wire command arriving from a higher level.
// Timing: a command stable from cycle t appears at the output after the
// clock edge of cycle t+NSTAB-1 (NSTAB samples).  NSTAB = 3 is the
// document's stability period; holding the old output (rather than NOP)
// while a change is being qualified is this design's choice.
module gfilter
  import root_pkg::*;
#(
  parameter int unsigned NSTAB = 3
) (
  input  logic    clk,
  input  logic    rst_n,
  input  dn_cmd_e d,
  output dn_cmd_e q
);

  localparam int unsigned CW = $clog2(NSTAB + 1);
  dn_cmd_e       prev;
  logic [CW-1:0] cnt;     // number of consecutive equal samples, saturating

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev <= D_NOP;
      cnt  <= CW'(NSTAB);
      q    <= D_NOP;
    end else begin
      prev <= d;
      if (d != prev) cnt <= CW'(1);
      else if (cnt < CW'(NSTAB)) cnt <= cnt + 1'b1;
      if (d == prev && cnt >= CW'(NSTAB - 1)) q <= d;
    end
  end

endmodule
