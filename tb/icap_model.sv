// icap_model: behavioural model of the device configuration port used for
// partial reconfiguration. It is not synthesizable logic of the design: it
// only answers a start pulse with a done pulse RECONF_CYCLES clocks later,
// the time writing a partial bitstream takes (0.2 ms = 20000 cycles at
// 100 MHz in the audio example). It counts the reconfigurations it made.
module icap_model #(
  parameter int RECONF_CYCLES = 20000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic done,
  output int   n_reconf,
  output logic busy
);
  int cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= 0;
      busy     <= 1'b0;
      done     <= 1'b0;
      n_reconf <= 0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        cnt  <= RECONF_CYCLES - 1;
      end else if (busy) begin
        if (cnt == 0) begin
          busy     <= 1'b0;
          done     <= 1'b1;
          n_reconf <= n_reconf + 1;
        end else begin
          cnt <= cnt - 1;
        end
      end
    end
  end
endmodule
