// load_reg: a register with an active-low load strobe, used for MAR, IRX,
// ACCA and the one-bit Z and C flags of the datapath.
//
// On a rising clock edge q takes d when load_n is low and holds otherwise.
// An asynchronous active-low reset clears it to RESET_VAL. The active-low
// strobe follows the block diagram's signal convention; the reset value
// is this design's own choice (the description gives none).
module load_reg #(
  parameter int unsigned    WIDTH     = 8,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             reset_n,
  input  logic             load_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n)     q <= RESET_VAL;
    else if (!load_n) q <= d;
  end

endmodule
