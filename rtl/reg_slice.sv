// reg_slice: one pipeline register on a valid/ready stream.
//
// A full-throughput register slice: a main register and a skid register,
// so both the data/valid path and the ready path are registered and a word
// can pass every cycle.  Latency one cycle.  Used for the pipeline stage
// of long soft links.
module reg_slice #(
  parameter int W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);

  logic         skid_valid;
  logic [W-1:0] skid_data;

  assign in_ready = !skid_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      skid_valid <= 1'b0;
      out_data   <= '0;
      skid_data  <= '0;
    end else begin
      if (!out_valid || out_ready) begin
        // output register free: take the skid word first, else the input
        if (skid_valid) begin
          out_valid  <= 1'b1;
          out_data   <= skid_data;
          skid_valid <= 1'b0;
        end else begin
          out_valid <= in_valid;
          out_data  <= in_data;
        end
      end else if (in_valid && in_ready) begin
        // output stalled: park the incoming word
        skid_valid <= 1'b1;
        skid_data  <= in_data;
      end
    end
  end

endmodule
