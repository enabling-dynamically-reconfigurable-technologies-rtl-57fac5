// pcie_rp_top: static region of a PCIe-attached FPGA co-processor with
// partially reconfigurable regions (PRRs).
//
// The host reaches the design through the transaction layer of a PCIe x4
// endpoint (the physical and data-link layers are the vendor's core and sit
// outside this module).  Data paths, all 64 bits wide at 125 MHz:
//
//   host memory --MRd/CplD--> dma_engine -> DMA READ FIFO -> buffer_router
//        -> Recv FIFO of PRR p   (application data)
//        -> ICAP Recv FIFO -> reconfig_ctrl -> ICAP (32-bit words)
//   PRR p Send FIFO -> buffer_router -> DMA WRITE FIFO -> dma_engine --MWr--> host memory
//
// Control: the host writes and reads the register file with single-DWORD
// memory requests (PIO).  It sets up a DMA (host address, number of 128-byte
// TLPs, direction, target buffer) and starts it; the FPGA is bus master for
// the whole transfer.  Events (DMA complete, accelerator needs data / has
// results / has completed, reconfiguration needs data / complete) set bits
// of the interrupt status register and raise cfg_interrupt to the endpoint.
//
// Ports: clk/rst_n (endpoint user clock and reset), completer_id (the bus,
// device and function number assigned at enumeration), the receive and
// transmit beat streams of the endpoint (valid/ready), the interrupt request
// handshake and the ICAP pins.
//
// Parameters: NUM_PRR regions (three in the described system, up to seven
// supported by the 3-bit target field), FIFO_DEPTH 64-bit words per buffer
// (32 KB), RESULT_WORDS Send FIFO words that make up one result DMA.
//
// From the design description: the block structure (endpoint, bus-master
// DMA, register file, DMA READ/WRITE FIFOs, a Send and a Recv FIFO per PRR,
// the reconfiguration controller with its own Recv FIFO in front of the
// ICAP), 64-bit 32 KB buffers, 128-byte TLPs, three PRRs, the six events.
// Own choices: steering the DMA FIFOs by a target field of the DMA control
// register, the beat format, the register map, holding a PRR in reset and
// gating its buffers while it is reconfigured, and one result DMA's worth of
// Send FIFO words as the "results produced" threshold.
module pcie_rp_top
  import pcie_rp_pkg::*;
#(
  parameter int unsigned NUM_PRR      = 3,
  parameter int unsigned FIFO_DEPTH   = 4096,
  parameter int unsigned RESULT_WORDS = FIFO_DEPTH,
  localparam int unsigned LW = $clog2(FIFO_DEPTH) + 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] completer_id,
  input  tlp_beat_t   rx_beat,
  input  logic        rx_valid,
  output logic        rx_ready,
  output tlp_beat_t   tx_beat,
  output logic        tx_valid,
  input  logic        tx_ready,
  output logic        cfg_interrupt,
  input  logic        cfg_interrupt_rdy,
  output logic        icap_ce_n,
  output logic        icap_write_n,
  output logic [31:0] icap_i,
  input  logic        icap_busy
);

  // register file <-> rest
  dma_cmd_t    dma_cmd;
  rcfg_cmd_t   rcfg_cmd;
  logic        dma_busy, dma_done;
  logic [15:0] dma_tlps_done;
  logic [31:0] irq_status, irq_clear, irq_mask, events;
  logic        reg_wr_en;
  logic [7:0]  reg_wr_addr, reg_rd_addr;
  logic [31:0] reg_wr_data, reg_rd_data;
  logic [15:0] irq_sent;

  // DMA FIFOs
  logic          rdf_wr_en, rdf_rd_en, rdf_empty;
  logic [63:0]   rdf_wr_data, rdf_rd_data;
  logic [LW-1:0] rdf_level;
  logic          wrf_wr_en, wrf_rd_en, wrf_full;
  logic [63:0]   wrf_wr_data, wrf_rd_data;
  logic [LW-1:0] wrf_level;

  // region buffers
  logic          recv_wr_en [NUM_PRR+1];
  logic          recv_full  [NUM_PRR+1];
  logic [63:0]   recv_wr_data;
  logic          send_rd_en  [NUM_PRR];
  logic [63:0]   send_rd_data[NUM_PRR];
  logic          send_empty  [NUM_PRR];

  // ICAP side
  logic          icf_rd_en, icf_empty;
  logic [63:0]   icf_rd_data;
  logic [LW-1:0] icf_level;
  logic          rcfg_busy, rcfg_done, rcfg_need, ev_rcfg_need, ev_rcfg_done;
  logic [31:0]   rcfg_count;
  logic [2:0]    hold_prr;

  // PRR status
  logic [NUM_PRR-1:0] prr_run, prr_complete, prr_recv_empty, prr_send_ready;
  logic [NUM_PRR-1:0] ev_need, ev_results, ev_done;
  logic [31:0]        prr_reg1[NUM_PRR], prr_reg2[NUM_PRR];
  logic [31:0]        prr_ressreg[NUM_PRR], prr_bitid[NUM_PRR];

  reg_file #(.NUM_PRR(NUM_PRR)) u_regs (
    .clk, .rst_n,
    .wr_en(reg_wr_en), .wr_addr(reg_wr_addr), .wr_data(reg_wr_data),
    .rd_addr(reg_rd_addr), .rd_data(reg_rd_data),
    .dma_cmd, .dma_busy, .dma_tlps_done,
    .irq_status, .irq_clear, .irq_mask,
    .rcfg_cmd, .rcfg_need, .rcfg_done, .rcfg_busy, .rcfg_count,
    .prr_run, .prr_reg1, .prr_reg2, .prr_ressreg, .prr_bitid,
    .prr_complete, .prr_recv_empty, .prr_send_ready
  );

  dma_engine #(.FIFO_DEPTH(FIFO_DEPTH)) u_dma (
    .clk, .rst_n, .completer_id,
    .rx_beat, .rx_valid, .rx_ready,
    .tx_beat, .tx_valid, .tx_ready,
    .dma_cmd, .dma_busy, .dma_done, .dma_tlps_done,
    .reg_wr_en, .reg_wr_addr, .reg_wr_data, .reg_rd_addr, .reg_rd_data,
    .rdf_wr_en, .rdf_wr_data, .rdf_level,
    .wrf_rd_en, .wrf_rd_data, .wrf_level
  );

  sync_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_dma_read_fifo (
    .clk, .rst_n,
    .wr_en(rdf_wr_en), .wr_data(rdf_wr_data), .full(),
    .rd_en(rdf_rd_en), .rd_data(rdf_rd_data), .empty(rdf_empty), .level(rdf_level)
  );

  sync_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_dma_write_fifo (
    .clk, .rst_n,
    .wr_en(wrf_wr_en), .wr_data(wrf_wr_data), .full(wrf_full),
    .rd_en(wrf_rd_en), .rd_data(wrf_rd_data), .empty(), .level(wrf_level)
  );

  buffer_router #(.NUM_PRR(NUM_PRR)) u_router (
    .clk, .rst_n, .dma_cmd, .dma_busy,
    .rdf_rd_en, .rdf_rd_data, .rdf_empty,
    .recv_wr_en, .recv_wr_data, .recv_full,
    .send_rd_en, .send_rd_data, .send_empty,
    .wrf_wr_en, .wrf_wr_data, .wrf_full
  );

  sync_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_icap_recv_fifo (
    .clk, .rst_n,
    .wr_en(recv_wr_en[0]), .wr_data(recv_wr_data), .full(recv_full[0]),
    .rd_en(icf_rd_en), .rd_data(icf_rd_data), .empty(icf_empty), .level(icf_level)
  );

  reconfig_ctrl #(.FIFO_DEPTH(FIFO_DEPTH)) u_rcfg (
    .clk, .rst_n, .rcfg_cmd,
    .fifo_push(recv_wr_en[0]), .fifo_rd_en(icf_rd_en), .fifo_rd_data(icf_rd_data),
    .fifo_empty(icf_empty), .fifo_level(icf_level),
    .icap_ce_n, .icap_write_n, .icap_i, .icap_busy,
    .busy(rcfg_busy), .done(rcfg_done), .need_data(rcfg_need), .count(rcfg_count),
    .hold_prr, .ev_need(ev_rcfg_need), .ev_done(ev_rcfg_done)
  );

  for (genvar p = 0; p < NUM_PRR; p++) begin : g_prr
    logic [LW-1:0] send_level;
    prr_slot #(
      .FIFO_DEPTH(FIFO_DEPTH), .RESULT_WORDS(RESULT_WORDS),
      .BITSTREAM_ID(32'(p + 1))
    ) u_slot (
      .clk, .rst_n,
      .run(prr_run[p]), .hold(hold_prr == 3'(p + 1)),
      .recv_wr_en(recv_wr_en[p+1]), .recv_wr_data, .recv_full(recv_full[p+1]),
      .recv_empty(prr_recv_empty[p]),
      .send_rd_en(send_rd_en[p]), .send_rd_data(send_rd_data[p]),
      .send_empty(send_empty[p]), .send_level,
      .reg1(prr_reg1[p]), .reg2(prr_reg2[p]), .ressreg(prr_ressreg[p]),
      .bitstream_id(prr_bitid[p]), .complete(prr_complete[p]),
      .send_ready(prr_send_ready[p]),
      .ev_need(ev_need[p]), .ev_results(ev_results[p]), .ev_done(ev_done[p])
    );
  end

  always_comb begin
    events = '0;
    events[EV_DMA_DONE]  = dma_done;
    events[EV_RCFG_NEED] = ev_rcfg_need;
    events[EV_RCFG_DONE] = ev_rcfg_done;
    for (int p = 0; p < NUM_PRR; p++) begin
      events[EV_ACC_NEED + p]    = ev_need[p];
      events[EV_ACC_RESULTS + p] = ev_results[p];
      events[EV_ACC_DONE + p]    = ev_done[p];
    end
  end

  irq_ctrl u_irq (
    .clk, .rst_n, .events, .irq_clear, .irq_mask, .irq_status,
    .cfg_interrupt, .cfg_interrupt_rdy, .irq_sent
  );

endmodule
