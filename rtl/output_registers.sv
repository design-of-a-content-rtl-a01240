// output_registers: ZR0..ZR3, one result register per ALU. Register k takes
// ALU k's result on the rising edge when load[k] is high (the ALU's done
// pulse), so after an execution phase each holds the last result its ALU
// produced; the root node's result ends up in the register of the ALU that
// executed it. The host reads them in parallel or through rd_sel/rd_data.
// Asynchronous active-low reset to 0. The read port is this design's choice.
module output_registers
  import cbadp_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [NUM_ALU-1:0]              load,
  input  logic [NUM_ALU-1:0][DATA_W-1:0]  d,
  output logic [NUM_ALU-1:0][DATA_W-1:0]  q,
  input  logic [$clog2(NUM_ALU)-1:0]      rd_sel,
  output logic [DATA_W-1:0]               rd_data
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else
      for (int k = 0; k < NUM_ALU; k++)
        if (load[k]) q[k] <= d[k];
  end
  assign rd_data = q[rd_sel];
endmodule
