// ctrl_bus_switch: multiport switch of the control bus.
//
// The control bus is a simple shared memory-mapped bus (derived from
// Avalon-MM): separate address, write data and read data, read and write
// strobes, and an active-low ready from the slave. A transfer completes in
// a clock where a strobe is high and ready_n is low; a busy slave holds
// ready_n high to insert wait states, and the master keeps its strobe and
// address until then. Read data is valid in the completing clock.
//
// NM masters share NS slaves. Master 0 has the highest priority (fixed
// priority arbitration); a master that is not granted sees ready_n high and
// simply waits. The slave is selected by the top SW address bits; the
// slave sees the remaining low bits. Unmapped slave numbers complete at
// once and read zero. Purely combinational.
module ctrl_bus_switch #(
  parameter int unsigned NM = 2,
  parameter int unsigned NS = 4,
  parameter int unsigned AW = 16,
  parameter int unsigned SW = 4
) (
  // master side
  input  logic [AW-1:0]    m_addr    [NM],
  input  logic [31:0]      m_wdata   [NM],
  input  logic             m_read    [NM],
  input  logic             m_write   [NM],
  output logic [31:0]      m_rdata   [NM],
  output logic             m_ready_n [NM],
  // slave side
  output logic [AW-SW-1:0] s_addr    [NS],
  output logic [31:0]      s_wdata   [NS],
  output logic             s_read    [NS],
  output logic             s_write   [NS],
  input  logic [31:0]      s_rdata   [NS],
  input  logic             s_ready_n [NS]
);
  logic                   any;
  localparam int unsigned GW = (NM > 1) ? $clog2(NM) : 1;
  logic [GW-1:0]          g;
  logic [SW-1:0]          sel;

  always_comb begin
    any = 1'b0;
    g   = '0;
    for (int i = NM - 1; i >= 0; i--)
      if (m_read[i] || m_write[i]) begin
        any = 1'b1;
        g   = ($bits(g))'(i);
      end
    sel = m_addr[g][AW-1 -: SW];
    for (int s = 0; s < NS; s++) begin
      s_addr[s]  = m_addr[g][AW-SW-1:0];
      s_wdata[s] = m_wdata[g];
      s_read[s]  = any && m_read[g]  && (sel == SW'(s));
      s_write[s] = any && m_write[g] && (sel == SW'(s));
    end
  end

  // return path kept in its own process so that the slave-side read data
  // and ready never appear to feed back into the request path
  always_comb begin
    for (int i = 0; i < NM; i++) begin
      m_rdata[i]   = '0;
      m_ready_n[i] = 1'b1;
    end
    if (any) begin
      if (32'(sel) < NS) begin
        m_rdata[g]   = s_rdata[sel[$clog2(NS)-1:0]];
        m_ready_n[g] = s_ready_n[sel[$clog2(NS)-1:0]];
      end else begin
        m_ready_n[g] = 1'b0;
      end
    end
  end
endmodule
