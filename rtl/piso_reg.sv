// piso_reg: parallel-in serial-out register for blocks of L results.
//
// On load it captures L words at once and then presents them one per clock,
// din[0] first, with out_valid high while words remain. A load always
// restarts the sequence with the new block; at one input sample per clock a
// block filter loads every L clocks, just as the previous block has left.
//
// Interface: load/din in, out_valid/dout out. Timing: din[0] appears in the
// clock after load, din[j] j clocks later. Reset (synchronous, active low)
// empties the register.
module piso_reg #(
  parameter int unsigned L = 3,
  parameter int unsigned W = 18
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic signed [W-1:0] din [L],
  output logic                out_valid,
  output logic signed [W-1:0] dout
);

  localparam int unsigned CNTW = $clog2(L + 1);

  logic signed [W-1:0] sr [L];
  logic [CNTW-1:0]     left;   // words still to be sent

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      left <= '0;
    end else if (load) begin
      left <= CNTW'(L);
    end else if (left != '0) begin
      left <= left - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (load) begin
      sr <= din;
    end else if (left != '0) begin
      for (int k = 0; k < int'(L) - 1; k++) sr[k] <= sr[k+1];
    end
  end

  assign out_valid = (left != '0);
  assign dout      = sr[0];

endmodule
