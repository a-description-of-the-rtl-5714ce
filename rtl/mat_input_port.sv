// Input port (IA or IB) with up to NDEV device interfaces.
//
// Each device interface holds a 64-bit data buffer, a data-available flag and
// a one-bit data mark buffer. The 4-bit device register selects the device
// whose buffer is the bus source and whose flags are the conditions "data
// available" and "data mark". Activating the port (act) clears the selected
// device's data-available flag and sends it a one-cycle request (dev_req).
// The device answers with a load strobe (dev_ld) carrying data and mark,
// which fills its buffer and sets data-available.
// If a device load and an activate meet in the same cycle, the load wins.
// Device register: load (value chosen outside), increment, decrement, clear.
module mat_input_port
  import mat_pkg::*;
#(
  parameter int unsigned NDEV = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  rop_e       dev_op,
  input  logic [3:0] dev_val,
  input  logic       act,
  output word_t      data,
  output logic       da,
  output logic       dm,
  output logic [3:0] dev,
  // device side
  output logic [NDEV-1:0] dev_req,
  input  logic [NDEV-1:0] dev_ld,
  input  word_t           dev_data [NDEV],
  input  logic [NDEV-1:0] dev_mark
);
  word_t           buf_q [NDEV];
  logic [NDEV-1:0] da_q, dm_q;

  assign data = buf_q[dev];
  assign da   = da_q[dev];
  assign dm   = dm_q[dev];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dev     <= '0;
      da_q    <= '0;
      dm_q    <= '0;
      dev_req <= '0;
      for (int i = 0; i < int'(NDEV); i++) buf_q[i] <= '0;
    end else begin
      case (dev_op)
        R_LD:    dev <= dev_val;
        R_INC:   dev <= dev + 4'd1;
        R_DEC:   dev <= dev - 4'd1;
        R_CLR:   dev <= '0;
        default: ;
      endcase
      for (int i = 0; i < int'(NDEV); i++) begin
        dev_req[i] <= act && (dev == 4'(i));
        if (dev_ld[i]) begin
          buf_q[i] <= dev_data[i];
          dm_q[i]  <= dev_mark[i];
          da_q[i]  <= 1'b1;
        end else if (act && dev == 4'(i)) begin
          da_q[i]  <= 1'b0;
        end
      end
    end
  end
endmodule
