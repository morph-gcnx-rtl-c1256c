// glb_bank: one bank of the global buffer (GLB), a scratchpad of 262144
// doubles (2 MB; sixteen banks make the published 32 MB), attached to the west
// end of one row link.
//
// Stream engine: a command (cmd_valid with base, len and a flit header) makes
// the bank read words base..base+len-1, one per cycle, and send each as a flit
// with the header's destination and buffer, its address counting up from
// hdr.addr. Flits arrive one cycle after the word is read; busy stays high
// until the last one has left.
// Write-back: every flit arriving from the link with bufsel BUF_GLB is written
// to word flit.addr in the cycle it arrives.
// Host port: the off-chip side (DRAM transfers) reads and writes single words;
// reads return one cycle later. The host port is for use while the bank is
// not streaming or receiving; the link side has priority. Bank sizing and the
// stream engine are this design's choices: the published design describes
// the GLB only as a multi-bank scratchpad whose banks are shared by PEs.
module glb_bank
  import morph_pkg::*;
#(
  parameter int unsigned WORDS = BANK_WORDS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // stream commands
  input  logic                    cmd_valid,
  input  logic [ADDR_W-1:0]       cmd_base,
  input  logic [ADDR_W-1:0]       cmd_len,
  input  flit_t                   cmd_hdr,
  output logic                    busy,
  // interconnect
  output flit_t                   link_tx,
  input  flit_t                   link_rx,
  // host (DRAM side) port
  input  logic                    host_we,
  input  logic                    host_re,
  input  logic [$clog2(WORDS)-1:0] host_addr,
  input  fp64_t                   host_wdata,
  output fp64_t                   host_rdata
);

  localparam int unsigned AW = $clog2(WORDS);

  fp64_t             mem [WORDS];
  logic              active, rd_pend;
  logic [ADDR_W-1:0] ptr, left, taddr;
  flit_t             hdr;
  fp64_t             rdata;
  logic              link_we;

  assign link_we = link_rx.valid && link_rx.bufsel == BUF_GLB;
  assign busy    = active || rd_pend || cmd_valid;

  always_ff @(posedge clk) begin
    if (link_we) mem[AW'(link_rx.addr)] <= link_rx.data;
    else if (host_we) mem[host_addr] <= host_wdata;
    if (active) rdata <= mem[AW'(ptr)];
    else if (host_re) rdata <= mem[host_addr];
  end
  assign host_rdata = rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      rd_pend <= 1'b0;
      ptr     <= '0;
      left    <= '0;
      taddr   <= '0;
      hdr     <= FLIT_IDLE;
      link_tx <= FLIT_IDLE;
    end else begin
      rd_pend <= active;
      link_tx <= FLIT_IDLE;
      if (rd_pend) begin
        link_tx       <= hdr;
        link_tx.valid <= 1'b1;
        link_tx.addr  <= taddr;
        link_tx.data  <= rdata;
        taddr         <= taddr + 1'b1;
      end
      if (active) begin
        ptr  <= ptr + 1'b1;
        left <= left - 1'b1;
        if (left == ADDR_W'(1)) active <= 1'b0;
      end else if (cmd_valid && !rd_pend) begin
        active <= (cmd_len != '0);
        ptr    <= cmd_base;
        left   <= cmd_len;
        hdr    <= cmd_hdr;
        taddr  <= cmd_hdr.addr;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(host_we && link_we))
    else $error("glb_bank: host write collides with a link write");
  assert property (@(posedge clk) disable iff (!rst_n) !(cmd_valid && (active || rd_pend)))
    else $error("glb_bank: stream command while streaming");

endmodule
