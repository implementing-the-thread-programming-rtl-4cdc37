// bus_arb: two-master arbitration for the subsystem's slave port.
//
// The subsystem has one memory-mapped slave port, but both the CPU and a
// hardware thread act as bus masters. This helper gives the port to one of
// them per cycle: a master raises cs with its access and holds it until gnt
// comes back; the access takes place in the cycle gnt is high, and read data
// is valid in that same cycle. When both ask, the one not served last wins
// (round robin), so neither can lock the other out. It stands in for the
// arbitration of the system bus, which the document takes from the FPGA
// vendor and does not describe; only the rule that one thread at a time
// reaches the semaphore registers is the document's.
module bus_arb
  import sem_pkg::*;
#(
  parameter int unsigned ADDR_W = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        m_cs,
  input  logic [1:0]        m_we,
  input  logic [ADDR_W-1:0] m_addr  [2],
  input  data_t             m_wdata [2],
  output logic [1:0]        m_gnt,
  output logic              s_cs,
  output logic              s_we,
  output logic [ADDR_W-1:0] s_addr,
  output data_t             s_wdata
);
  logic last;   // master served most recently
  logic pick;

  always_comb begin
    unique case (m_cs)
      2'b01:   pick = 1'b0;
      2'b10:   pick = 1'b1;
      2'b11:   pick = ~last;
      default: pick = 1'b0;
    endcase
  end

  assign m_gnt   = (m_cs == 2'b00) ? 2'b00 : (pick ? 2'b10 : 2'b01);
  assign s_cs    = m_cs != 2'b00;
  assign s_we    = m_we[pick];
  assign s_addr  = m_addr[pick];
  assign s_wdata = m_wdata[pick];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     last <= 1'b1;
    else if (s_cs)  last <= pick;
  end

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(m_gnt))
    else $error("bus_arb: more than one master granted");
  a_grant_req: assert property (@(posedge clk) disable iff (!rst_n) (m_gnt & ~m_cs) == 2'b00)
    else $error("bus_arb: grant without request");
endmodule
