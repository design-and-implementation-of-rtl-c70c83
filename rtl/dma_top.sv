// dma_top: single-channel byte-wide DMA controller with SECDED-protected
// memory.
//
// A transfer is requested by the peripheral (dma_req pin, synchronised by
// two flip-flops so that the peripheral may run on another clock) or by the
// CPU (the start bit of the CTRL register); mode and destination come from
// the registers. The peripheral holds dma_req until it sees dma_ack. The DMA controller acknowledges, takes one byte (single) or
// four bytes (burst) from the peripheral data port, and writes each through
// the ECC encoder into the codeword memory. It then signals done and reads
// every written word back through the syndrome checker, which corrects a
// single flipped bit and flags a double error; the verdict is posted to the
// status register and can raise irq.
//
// The CPU can also read and write the memory directly (cpu_mem_*). Its
// accesses go through the same arbiter, encoder and syndrome checker; while
// a DMA transfer owns the memory, cpu_mem_gnt is low and the CPU must hold
// its request. CPU writes and reads complete in the granted cycle; read data
// is combinational (corrected data and error flags in the same cycle).
//
// err_inject is XORed into every codeword on its way into memory. It models
// upsets in the stored word for testing and must be held at zero in normal
// use.
//
// Block structure (encoder, DMA FSM, syndrome checker joined by a top level,
// correction on the read path) follows the design description; the register
// port, the CPU memory port and err_inject are this implementation's choices.
module dma_top
  import dma_pkg::*;
#(
  parameter int unsigned DATA_W    = dma_pkg::DEF_DATA_W,
  parameter int unsigned ADDR_W    = dma_pkg::DEF_ADDR_W,
  parameter int unsigned BURST_LEN = dma_pkg::DEF_BURST_LEN,
  localparam int unsigned P        = ecc_parity_bits(DATA_W),
  localparam int unsigned CW_W     = ecc_cw_w(DATA_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  // peripheral side
  input  logic              dma_req,
  output logic              dma_ack,
  output logic              dma_done,
  output logic              periph_rd,
  input  logic [DATA_W-1:0] periph_data,
  // CPU register port
  input  logic              csr_we,
  input  logic [1:0]        csr_addr,
  input  logic [7:0]        csr_wdata,
  output logic [7:0]        csr_rdata,
  output logic              irq,
  // CPU memory port
  input  logic              cpu_mem_req,
  input  logic              cpu_mem_we,
  input  logic [ADDR_W-1:0] cpu_mem_addr,
  input  logic [DATA_W-1:0] cpu_mem_wdata,
  output logic              cpu_mem_gnt,
  output logic [DATA_W-1:0] cpu_mem_rdata,
  output logic              cpu_mem_single_err,
  output logic              cpu_mem_double_err,
  // read-back check of the DMA transfer
  output logic              chk_valid,
  output logic [DATA_W-1:0] chk_data,
  output logic              chk_single,
  output logic              chk_double,
  output logic [P-1:0]      chk_syndrome,
  output dma_state_e        dma_state,
  // fault injection (test only)
  input  logic [CW_W-1:0]   err_inject
);

  // Control and status registers <-> DMA controller
  logic              start_req, req_any, req_pin, busy;
  dma_mode_e         mode;
  logic [ADDR_W-1:0] dst_addr;
  logic              addr_err, mode_err;

  // DMA memory master
  logic              dma_bus_req, dma_bus_gnt, dma_we;
  logic [ADDR_W-1:0] dma_addr;
  logic [DATA_W-1:0] dma_wdata;

  // memory port
  logic              mem_we;
  logic [ADDR_W-1:0] mem_addr;
  logic [DATA_W-1:0] mem_wdata, rd_data;
  logic [CW_W-1:0]   enc_cw, mem_rdata;
  logic              rd_single, rd_double;
  logic [P-1:0]      rd_syndrome;

  req_sync #(.STAGES(2)) u_sync (
    .clk, .rst_n, .async_in(dma_req), .sync_out(req_pin)
  );

  assign req_any = req_pin || start_req;

  dma_csr #(.ADDR_W(ADDR_W)) u_csr (
    .clk, .rst_n,
    .csr_we, .csr_addr, .csr_wdata, .csr_rdata,
    .start_req, .mode, .dst_addr,
    .dma_ack, .dma_busy(busy),
    .ev_done(dma_done), .ev_single(chk_single), .ev_double(chk_double),
    .ev_addr_err(addr_err), .ev_mode_err(mode_err),
    .irq
  );

  dma_controller #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .BURST_LEN(BURST_LEN)) u_dma (
    .clk, .rst_n,
    .dma_req(req_any), .mode, .dst_addr,
    .dma_ack, .busy, .done(dma_done), .addr_err, .mode_err,
    .periph_rd, .periph_data,
    .bus_req(dma_bus_req), .bus_gnt(dma_bus_gnt),
    .mem_we(dma_we), .mem_addr(dma_addr), .mem_wdata(dma_wdata),
    .rd_single_err(rd_single), .rd_double_err(rd_double),
    .chk_valid, .chk_single, .chk_double,
    .state(dma_state)
  );

  mem_arbiter #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_arb (
    .dma_req(dma_bus_req), .dma_we, .dma_addr, .dma_wdata, .dma_gnt(dma_bus_gnt),
    .cpu_req(cpu_mem_req), .cpu_we(cpu_mem_we), .cpu_addr(cpu_mem_addr),
    .cpu_wdata(cpu_mem_wdata), .cpu_gnt(cpu_mem_gnt),
    .mem_we, .mem_addr, .mem_wdata
  );

  ecc_encoder #(.DATA_W(DATA_W)) u_enc (
    .data(mem_wdata), .codeword(enc_cw)
  );

  ecc_memory #(.CW_W(CW_W), .ADDR_W(ADDR_W)) u_mem (
    .clk, .we(mem_we), .addr(mem_addr), .wdata(enc_cw ^ err_inject),
    .rdata(mem_rdata)
  );

  ecc_syndrome #(.DATA_W(DATA_W)) u_syn (
    .codeword(mem_rdata), .data_out(rd_data), .syndrome(rd_syndrome),
    .single_err(rd_single), .double_err(rd_double)
  );

  assign chk_data           = rd_data;
  assign chk_syndrome       = rd_syndrome;
  assign cpu_mem_rdata      = rd_data;
  assign cpu_mem_single_err = cpu_mem_gnt && !cpu_mem_we && rd_single;
  assign cpu_mem_double_err = cpu_mem_gnt && !cpu_mem_we && rd_double;

endmodule
