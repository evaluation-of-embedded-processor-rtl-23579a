// nisc_divider: multi-cycle unsigned divider of the NISC data path.
//
// Radix-2 restoring division over the low DIV_W bits of the operands. A
// start pulse latches dividend and divisor and raises busy; each following
// clock shifts one dividend bit into the partial remainder, subtracts the
// divisor when it fits and shifts one quotient bit in. After DIV_W clocks
// busy falls and quotient and remainder (zero-extended to WIDTH) are loaded
// into the output registers, where they stay until the next division ends.
// The remainder is the modulo of the hash functions. A start while busy
// abandons the running division. Division by zero returns an all-ones
// quotient and the dividend as remainder.
//
// Timing: start in cycle t, busy in cycles t+1 .. t+DIV_W, results readable
// from cycle t+DIV_W+1. The latency grows linearly with DIV_W, which is why
// the processor narrows the divider from 32 to 16 bits (DIV_W = 16 here).
// The processor used a vendor divider core; this shift-subtract
// implementation is this design's own.
module nisc_divider #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DIV_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  output logic             busy,
  output logic [WIDTH-1:0] quotient,
  output logic [WIDTH-1:0] remainder
);

  localparam int unsigned CW = $clog2(DIV_W + 1);

  logic [DIV_W-1:0] quo, dvs;
  logic [DIV_W:0]   rem;
  logic [CW-1:0]    cnt;

  logic [DIV_W:0]   shifted, diff;
  logic             fits;

  assign shifted = {rem[DIV_W-1:0], quo[DIV_W-1]};
  assign diff    = shifted - {1'b0, dvs};
  assign fits    = (shifted >= {1'b0, dvs});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt       <= '0;
      quo       <= '0;
      rem       <= '0;
      dvs       <= '0;
      quotient  <= '0;
      remainder <= '0;
    end else if (start) begin
      busy <= 1'b1;
      cnt  <= CW'(DIV_W);
      quo  <= dividend[DIV_W-1:0];
      dvs  <= divisor[DIV_W-1:0];
      rem  <= '0;
    end else if (busy) begin
      quo <= {quo[DIV_W-2:0], fits};
      rem <= fits ? diff : shifted;
      cnt <= cnt - 1'b1;
      if (cnt == CW'(1)) begin
        busy      <= 1'b0;
        quotient  <= WIDTH'({quo[DIV_W-2:0], fits});
        remainder <= WIDTH'(fits ? diff[DIV_W-1:0] : shifted[DIV_W-1:0]);
      end
    end
  end

endmodule
