// pcie_rp_pkg: shared types and constants of the PCIe-attached partially
// reconfigurable co-processor.
//
// The static region moves 64-bit words between a host and up to seven
// partially reconfigurable regions (PRRs) and the ICAP.  This package holds
// what several modules agree on: the transaction-layer beat format used on
// the endpoint stream, the TLP header codes, the register map, the interrupt
// event bit positions and the control words the register file hands out.
//
// From the design description: 64-bit data paths, 128-byte TLPs, 32 KB
// buffers, three PRRs (up to seven supported), 32-bit registers, the six
// interrupt events.  The register addresses, bit positions and the beat
// format are this design's own choices.
package pcie_rp_pkg;

  localparam int unsigned DW          = 64;   // data path width (bits)
  localparam int unsigned MAX_PRR     = 7;    // target field is 3 bits: 0 = ICAP, 1..7 = PRR
  localparam int unsigned TLP_BYTES   = 128;  // DMA TLP payload
  localparam int unsigned TLP_DWORDS  = TLP_BYTES / 4;
  localparam int unsigned TLP_WORDS   = TLP_BYTES / 8;

  // One beat of the transaction-layer stream (64 bits, first DWORD of a
  // packet in bits [63:32]).  'half' on the last beat means only [63:32]
  // carries a DWORD.
  typedef struct packed {
    logic [63:0] data;
    logic        sof;
    logic        eof;
    logic        half;
  } tlp_beat_t;

  // Fmt/Type byte of DWORD 0 (PCIe 1.0, 3-DWORD headers only).
  localparam logic [7:0] FT_MRD32 = 8'h00;
  localparam logic [7:0] FT_MWR32 = 8'h40;
  localparam logic [7:0] FT_CPL   = 8'h0A;
  localparam logic [7:0] FT_CPLD  = 8'h4A;

  // Register map (byte offsets in BAR0, 32-bit registers).
  localparam logic [7:0] A_DMA_ADDR    = 8'h00; // host physical address of the DMA segment
  localparam logic [7:0] A_DMA_NTLP    = 8'h04; // number of 128-byte TLPs
  localparam logic [7:0] A_DMA_CTRL    = 8'h08; // [0] start (W), [1] dir 1=FPGA->host, [6:4] target
  localparam logic [7:0] A_DMA_STATUS  = 8'h0C; // [0] busy, [31:16] TLPs completed
  localparam logic [7:0] A_IRQ_STATUS  = 8'h10; // event bits, write 1 to clear
  localparam logic [7:0] A_IRQ_MASK    = 8'h14;
  localparam logic [7:0] A_RCFG_CTRL   = 8'h18; // [0] start (W) [1] need_data [2] done [3] busy [6:4] PRR
  localparam logic [7:0] A_RCFG_LEN    = 8'h1C; // bitstream length in bytes (multiple of 4)
  localparam logic [7:0] A_RCFG_COUNT  = 8'h20; // 32-bit words written to ICAP so far
  localparam logic [7:0] A_PRR_RUN     = 8'h24; // bit p: PRR p released from reset
  localparam logic [7:0] A_PRR_STATUS  = 8'h28; // bit p: complete, bit 8+p: recv empty, bit 16+p: send level >= threshold
  localparam logic [7:0] A_PRR_BASE    = 8'h40; // PRR p: 0x40 + 0x10*(p-1): reg1, reg2, ressreg, bitstreamID

  // Interrupt event bits.
  localparam int unsigned EV_DMA_DONE    = 0;
  localparam int unsigned EV_RCFG_NEED   = 1;
  localparam int unsigned EV_RCFG_DONE   = 2;
  localparam int unsigned EV_ACC_NEED    = 8;   // + p - 1
  localparam int unsigned EV_ACC_RESULTS = 16;  // + p - 1
  localparam int unsigned EV_ACC_DONE    = 24;  // + p - 1

  // DMA directions as seen from the host: a DMA read moves host memory into
  // the FPGA, a DMA write moves FPGA results into host memory.
  typedef enum logic {DIR_TO_FPGA = 1'b0, DIR_TO_HOST = 1'b1} dma_dir_e;

  typedef struct packed {
    logic        start;   // one-cycle pulse
    dma_dir_e    dir;
    logic [2:0]  target;  // 0 = ICAP, p = PRR p
    logic [31:0] addr;
    logic [15:0] ntlp;
  } dma_cmd_t;

  typedef struct packed {
    logic        start;   // one-cycle pulse
    logic [2:0]  prr;     // PRR being reconfigured
    logic [31:0] len_bytes;
  } rcfg_cmd_t;

endpackage
