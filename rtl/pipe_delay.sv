// pipe_delay: a WIDTH-bit register chain of DEPTH stages (DEPTH >= 1).
//
// Used to carry a stage's side-band signals (valid, position, frame flags) next
// to a pipelined datapath so that both come out on the same cycle. All stages
// reset to zero. Output = input delayed by exactly DEPTH clock cycles.
module pipe_delay #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] stage [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) stage[i] <= '0;
    end else begin
      stage[0] <= d;
      for (int i = 1; i < int'(DEPTH); i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[DEPTH-1];

endmodule
