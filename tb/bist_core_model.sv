// bist_core_model: behavioural model of a BISTed core's self-test port, for
// simulation only (not part of the design).
//
// When bist_start is seen high at a clock edge the model clears bist_done,
// then counts 'latency' cycles and raises bist_done with bist_pass = good.
// With bist_start held high (level protocol) it does not restart until
// bist_start has been low again. 'starts' counts the tests launched.
module bist_core_model (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bist_start,
  output logic        bist_done,
  output logic        bist_pass,
  input  int unsigned latency,
  input  logic        good,
  output int unsigned starts
);
  int unsigned cnt;
  logic        running, start_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bist_done <= 1'b0;
      bist_pass <= 1'b0;
      running   <= 1'b0;
      cnt       <= 0;
      starts    <= 0;
      start_q   <= 1'b0;
    end else begin
      start_q <= bist_start;
      if (bist_start && !start_q && !running) begin
        bist_done <= 1'b0;
        running   <= 1'b1;
        cnt       <= latency;
        starts    <= starts + 1;
      end else if (running) begin
        if (cnt == 0) begin
          running   <= 1'b0;
          bist_done <= 1'b1;
          bist_pass <= good;
        end else begin
          cnt <= cnt - 1;
        end
      end
    end
  end
endmodule
