// Output port (OA, OB, OC or OD) with up to NDEV device interfaces.
//
// The 64-bit port register is loaded by ld with ld_data (OA/OB: from the
// shifted bus as a bus destination; OC/OD: from the BUS by a
// microoperation). Each device interface has a 64-bit data buffer, a one-bit
// data mark buffer and a busy flag; "space available" of the selected device
// (4-bit device register) is the complement of its busy flag. Activating the
// port (act) has effect only when the selected device has space: its buffer
// takes the port register (or ld_data when the port register is loaded in
// the same microinstruction), its mark takes act_mark, and busy is set. The
// device takes the data and clears busy with dev_done. Reset (rst_op)
// clears the selected device's busy flag, for initialisation.
module mat_output_port
  import mat_pkg::*;
#(
  parameter int unsigned NDEV = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  rop_e       dev_op,
  input  logic [3:0] dev_val,
  input  logic       ld,
  input  word_t      ld_data,
  input  logic       act,
  input  logic       act_mark,
  input  logic       rst_op,
  output word_t      port_q,
  output logic       sa,        // space available on the selected device
  output logic [3:0] dev,
  // device side
  output word_t           dev_data [NDEV],
  output logic [NDEV-1:0] dev_mark,
  output logic [NDEV-1:0] dev_busy,
  input  logic [NDEV-1:0] dev_done
);
  word_t next_port;
  assign next_port = ld ? ld_data : port_q;
  assign sa        = !dev_busy[dev];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dev      <= '0;
      port_q   <= '0;
      dev_mark <= '0;
      dev_busy <= '0;
      for (int i = 0; i < int'(NDEV); i++) dev_data[i] <= '0;
    end else begin
      port_q <= next_port;
      case (dev_op)
        R_LD:    dev <= dev_val;
        R_INC:   dev <= dev + 4'd1;
        R_DEC:   dev <= dev - 4'd1;
        R_CLR:   dev <= '0;
        default: ;
      endcase
      for (int i = 0; i < int'(NDEV); i++) begin
        if (dev == 4'(i) && act && !dev_busy[i]) begin
          dev_data[i] <= next_port;
          dev_mark[i] <= act_mark;
          dev_busy[i] <= 1'b1;
        end else if (dev_done[i] || (rst_op && dev == 4'(i))) begin
          dev_busy[i] <= 1'b0;
        end
      end
    end
  end
endmodule
