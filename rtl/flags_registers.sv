// flags_registers: FR0..FR3, one flag register per ALU, each holding carry,
// zero, negative and overflow. Register k is loaded from ALU k on the rising
// edge when load[k] is high (the ALU's done pulse); clear resets all four
// synchronously at the start of an execution phase. The host reads them all in
// parallel or one at a time through rd_sel/rd_data. Asynchronous active-low
// reset to 0. Clear and read port are this design's choices.
module flags_registers
  import cbadp_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic [NUM_ALU-1:0]         load,
  input  flags_t [NUM_ALU-1:0]       d,
  output flags_t [NUM_ALU-1:0]       q,
  input  logic [$clog2(NUM_ALU)-1:0] rd_sel,
  output flags_t                     rd_data
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else if (clear) q <= '0;
    else
      for (int k = 0; k < NUM_ALU; k++)
        if (load[k]) q[k] <= d[k];
  end
  assign rd_data = q[rd_sel];
endmodule
