// qca_pipe: synchronous model of the latency of the QCA clock-zone pipeline.
//
// A QCA circuit is divided into clock zones driven by four clock phases
// 90 degrees apart; each zone holds its result while the next one switches,
// so data moves as in a pipeline and a new input can enter every clock
// cycle. The 1-bit adders here span nine clock zones and deliver their
// result two full clock cycles after the inputs. This module stands in for
// that behaviour in a synchronous design: a DEPTH-stage register delay line,
// one register per clock cycle, accepting new data every cycle. The
// zone-by-zone timing inside a cycle is not modelled. The registers clear
// on an active-low asynchronous reset, which QCA itself does not have.
module qca_pipe #(
  parameter int unsigned WIDTH = 2,
  parameter int unsigned DEPTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] stage [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else begin
      stage[0] <= d;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[DEPTH-1];

  initial assert (DEPTH >= 1) else $error("qca_pipe needs DEPTH >= 1");
endmodule
