// output_register: holds the latest filter output.
//
// On a rising edge with load high it captures din; valid is high for the
// one cycle after each load, marking a new value in dout. dout holds its
// value until the next load. Reset clears both.
// The output register is part of the original block diagram; the valid
// pulse is this design's choice.
module output_register #(
  parameter int unsigned W = 37
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout,
  output logic         valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= load;
      if (load) dout <= din;
    end
  end
endmodule
