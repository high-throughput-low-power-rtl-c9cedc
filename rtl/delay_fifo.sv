// delay_fifo: fixed-latency FIFO that holds each received codeword for
// DEPTH clock cycles, so it reaches the Chien search in the same cycle as
// the error locator computed from it.
//
// The decoder accepts one codeword per cycle and its pipeline never stalls,
// so the FIFO is a chain of DEPTH registers that shifts every cycle: no read
// or write pointers and no full/empty flags are needed. A valid bit travels
// with the data. DEPTH = 0 gives a plain wire.
//
// Interface: in_valid/in_data are taken each rising clock edge and appear on
// out_valid/out_data DEPTH cycles later. rst_n (active low, asynchronous)
// clears the valid bits only.
module delay_fifo #(
  parameter int unsigned WIDTH = 63,
  parameter int unsigned DEPTH = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data
);

  if (DEPTH == 0) begin : g_wire
    assign out_valid = in_valid;
    assign out_data  = in_data;
  end else begin : g_chain
    logic [WIDTH-1:0] data_q [DEPTH];
    logic [DEPTH-1:0] vld_q;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld_q <= '0;
      else begin
        vld_q[0] <= in_valid;
        for (int i = 1; i < int'(DEPTH); i++) vld_q[i] <= vld_q[i-1];
      end
    end

    always_ff @(posedge clk) begin
      data_q[0] <= in_data;
      for (int i = 1; i < int'(DEPTH); i++) data_q[i] <= data_q[i-1];
    end

    assign out_valid = vld_q[DEPTH-1];
    assign out_data  = data_q[DEPTH-1];
  end

endmodule
