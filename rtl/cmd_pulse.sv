// cmd_pulse: turns a write of 1 into a command-register bit (KILL, TRIG or
// RST request) into a command of fixed length CMD_LEN RCLK cycles, as the
// document requires for commands generated by the root logic (8 cycles, so
// that the lowest level's 3-cycle stability filter and the I2C clock domain
// see it).  done is raised when the command has completed and cleared by the
// next start; this is the RDONE / RCREG bit 37 flag.
// Timing: active is high in the CMD_LEN cycles after the cycle of start; a
// start while active restarts the count.  Reset (rst_n, root-internal) clears
// active and done.
module cmd_pulse #(
  parameter int unsigned CMD_LEN = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic active,
  output logic done
);

  localparam int unsigned CW = $clog2(CMD_LEN + 1);
  logic [CW-1:0] cnt;

  assign active = (cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      done <= 1'b0;
    end else if (start) begin
      cnt  <= CW'(CMD_LEN);
      done <= 1'b0;
    end else if (cnt != '0) begin
      cnt  <= cnt - 1'b1;
      if (cnt == CW'(1)) done <= 1'b1;
    end
  end

endmodule
