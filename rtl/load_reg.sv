// load_reg: load-enabled register.
//
// Used twice in the multiplier: as the register that holds the multiplier
// operand for the duration of a multiplication (its bits feed the Booth
// select windows), and as the register that holds the final 2W-bit product
// until the next result replaces it.
//
// Interface: q takes d on the rising edge of clk when load is 1, and keeps
// its value otherwise. Asynchronous active-low reset to zero.
// That both registers exist follows the document; the load enable and the
// reset are this design's choice.
module load_reg #(
  parameter int unsigned WIDTH = 2 * booth_pkg::DEFAULT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

endmodule
