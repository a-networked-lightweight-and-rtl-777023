// icap_model: behavioural model of the FPGA's internal configuration access
// port for the testbenches. A byte is taken at each rising edge with ce_n and
// write_n low and busy low; the bytes are kept in order in data_q. busy is
// raised at random, about busy_pct percent of the cycles, to stall the writer.
module icap_model (
  input  logic       clk,
  input  logic       ce_n,
  input  logic       write_n,
  input  logic [7:0] i,
  output logic       busy
);
  byte unsigned data_q[$];
  int           busy_pct = 0;
  int           stalls = 0;      // cycles a byte was held by busy

  initial busy = 0;

  always @(posedge clk) begin
    if (!ce_n && !write_n) begin
      if (busy) stalls++;
      else      data_q.push_back(i);
    end
    busy <= (busy_pct > 0) && (($urandom % 100) < busy_pct);
  end
endmodule
