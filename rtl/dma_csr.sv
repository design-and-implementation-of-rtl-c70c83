// dma_csr: control and status registers of the DMA controller.
//
// A CPU programs a transfer through a byte-wide register port and reads back
// its status. Writes take effect on the rising clock edge; reads are
// combinational (csr_rdata follows csr_addr in the same cycle).
//
//   addr 0 CTRL   [1:0] mode (01 single, 10 burst), [2] interrupt enable,
//                 [7] start (write 1: a request is raised and held until the
//                 DMA acknowledges it; reads back as the pending request)
//   addr 1 ADDR   destination word address of the transfer
//   addr 2 STATUS [0] done, [1] corrected single error, [2] double error,
//                 [3] address error, [4] mode error: sticky, set by the DMA,
//                 cleared by writing 1; [7] busy (read only)
//   addr 3        reads as zero
//
// irq is high while the interrupt enable is set and any STATUS flag is set.
// A flag set by the DMA in the same cycle as a clearing write stays set.
//
// The description lists source/destination address, transfer size and mode
// as the transfer parameters and flags for error detection and completion
// interrupts as the status. Here data comes from the peripheral data port,
// so no source address is held, and the transfer size is given by the mode
// (one word or a burst). The register map and the write-1-to-clear rule are
// this implementation's choices.
module dma_csr
  import dma_pkg::*;
#(
  parameter int unsigned ADDR_W = dma_pkg::DEF_ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU register port
  input  logic              csr_we,
  input  logic [1:0]        csr_addr,
  input  logic [7:0]        csr_wdata,
  output logic [7:0]        csr_rdata,
  // to the DMA controller
  output logic              start_req,
  output dma_mode_e         mode,
  output logic [ADDR_W-1:0] dst_addr,
  // events from the DMA controller
  input  logic              dma_ack,
  input  logic              dma_busy,
  input  logic              ev_done,
  input  logic              ev_single,
  input  logic              ev_double,
  input  logic              ev_addr_err,
  input  logic              ev_mode_err,
  output logic              irq
);

  logic       irq_en;
  logic [4:0] flags;
  logic [4:0] ev;

  assign ev = {ev_mode_err, ev_addr_err, ev_double, ev_single, ev_done};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode      <= MODE_NONE;
      irq_en    <= 1'b0;
      start_req <= 1'b0;
      dst_addr  <= '0;
      flags     <= '0;
    end else begin
      if (dma_ack) start_req <= 1'b0;
      if (csr_we) begin
        unique case (csr_addr)
          CSR_CTRL: begin
            mode   <= dma_mode_e'(csr_wdata[1:0]);
            irq_en <= csr_wdata[2];
            if (csr_wdata[7]) start_req <= 1'b1;
          end
          CSR_ADDR:   dst_addr <= csr_wdata[ADDR_W-1:0];
          CSR_STATUS: flags    <= (flags & ~csr_wdata[4:0]) | ev;
          default: ;
        endcase
      end
      if (!(csr_we && csr_addr == CSR_STATUS)) flags <= flags | ev;
    end
  end

  always_comb begin
    csr_rdata = '0;
    unique case (csr_addr)
      CSR_CTRL:   csr_rdata = {start_req, 4'b0, irq_en, mode};
      CSR_ADDR:   csr_rdata[ADDR_W-1:0] = dst_addr;
      CSR_STATUS: begin
        csr_rdata[ST_MODE_ERR:ST_DONE] = flags;
        csr_rdata[ST_BUSY]             = dma_busy;
      end
      default: ;
    endcase
  end

  assign irq = irq_en && (flags != '0);

endmodule
