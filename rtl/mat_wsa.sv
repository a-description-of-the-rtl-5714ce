// Wide Store Address (WSA): the 16-bit address register of the shared 64-bit
// Wide Store memory, which is reached as the only device on input port A
// (reads) and output port A (writes).
//
// WSA works like Counter A (load from immediate data, EX, shifted bus or its
// Standard Group WSASG; increment, decrement, clear; WSASG := WSA). Two
// conditions come with it: WSAOR, the address lies outside the WS_WORDS
// words that exist, and WSAB, address busy: set when a memory transfer is
// requested (req, an activate on IA or OA) and cleared when the memory
// reports that it has taken the address (ws_taken).
// The busy handshake details (set on request, clear on "taken") are this
// design's reading of the description; the memory itself is outside.
module mat_wsa
  import mat_pkg::*;
#(
  parameter int unsigned WS_WORDS = 32768
) (
  input  logic        clk,
  input  logic        rst_n,
  input  rop_e        op,
  input  logic [15:0] val,
  input  sg_cmd_t     sg_cmd,
  input  logic        sg_we,
  input  logic        req,       // transfer requested on IA or OA
  input  logic        ws_taken,  // memory has read the address
  output logic [15:0] wsa,
  output logic        wsab,      // address busy
  output logic        wsaor,     // address out of range
  output logic        sg_ovf
);
  logic       zero_unused;
  logic [3:0] ptr_unused;

  mat_counter #(.W(16)) u_cnt (
    .clk, .rst_n, .op, .val, .sg_cmd, .sg_we, .cnt(wsa), .zero(zero_unused),
    .sg_ptr(ptr_unused), .sg_ovf
  );

  assign wsaor = (32'(wsa) >= WS_WORDS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        wsab <= 1'b0;
    else if (req)      wsab <= 1'b1;
    else if (ws_taken) wsab <= 1'b0;
  end
endmodule
