// irq_ctrl: collects the events the host must learn about and asks the PCIe
// endpoint to send an interrupt.
//
// Events (one-cycle pulses, bit positions in pcie_rp_pkg): a DMA is
// complete; an accelerator needs data; an accelerator has produced results;
// an accelerator has completed; the reconfiguration controller needs data;
// the reconfiguration is complete.  Each pulse sets its bit in the status
// register, which the host reads and clears by writing ones (irq_clear).
// When an event whose mask bit is set arrives, a request is raised towards
// the endpoint (cfg_interrupt) and held until the endpoint accepts it
// (cfg_interrupt_rdy); the endpoint turns it into an MSI write or a legacy
// Assert_INTx message.  Events arriving while a request is outstanding are
// covered by that request; events arriving on the accept cycle raise a new one.
//
// The event list follows the design description; the status/mask/clear
// scheme and the request/accept handshake are this design's own choices.
module irq_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] events,
  input  logic [31:0] irq_clear,
  input  logic [31:0] irq_mask,
  output logic [31:0] irq_status,
  output logic        cfg_interrupt,
  input  logic        cfg_interrupt_rdy,
  output logic [15:0] irq_sent       // number of interrupts accepted by the endpoint
);

  wire new_masked = |(events & irq_mask);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_status    <= '0;
      cfg_interrupt <= 1'b0;
      irq_sent      <= '0;
    end else begin
      irq_status <= (irq_status & ~irq_clear) | events;
      if (cfg_interrupt && cfg_interrupt_rdy) begin
        cfg_interrupt <= new_masked;
        irq_sent      <= irq_sent + 1'b1;
      end else if (new_masked) begin
        cfg_interrupt <= 1'b1;
      end
    end
  end

  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
                               cfg_interrupt && !cfg_interrupt_rdy |=> cfg_interrupt);

endmodule
