// reg_stage: one pipeline register on a valid/ready channel.
//
// Holds one item of type T. It takes a new item when it is empty or when
// its item leaves in the same cycle, so a stream passes at one item per
// cycle with one cycle of latency. out_valid and out_data come straight
// from flip-flops, which cuts the combinational path between the two
// sides. Used for the interconnect register stages and switch box outputs.
module reg_stage #(
  parameter type T = logic [31:0]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);

  logic valid_q;
  T     data_q;

  assign in_ready  = !valid_q || out_ready;
  assign out_valid = valid_q;
  assign out_data  = data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      data_q  <= '0;
    end else if (in_ready) begin
      valid_q <= in_valid;
      if (in_valid) data_q <= in_data;
    end
  end

endmodule
