// Control Store (CS): 2^AW words of 64 bits holding the microprogram.
//
// The word at the address buffer (raddr) is presented combinationally as the
// current microinstruction. One write port serves the CS LOAD microoperation
// (data from the OC register, address from the address selector) and, while
// the processor is held in reset, an external loader. The storage is not
// initialised; it must be written before it is executed.
module mat_control_store #(
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output logic [63:0]   rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [63:0]   wdata
);
  logic [63:0] mem [2**AW];

  assign rdata = mem[raddr];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end
endmodule
