// apc: the audio port controller, a small programmable DMA engine.
//
// It sits between the audio port interface and the DSP's on-chip SRAM. On
// every sample interrupt of the interface it runs a short program from its
// own program memory that moves the new samples between the interface
// registers and the SRAM buffers over the DMA bus, keeps the buffer
// descriptors up to date and, when a whole frame has been moved, raises a
// single interrupt to the DSP.
//
// Control part: ctrl_sm (fetch / execute / address generation), four
// execution machines (alu_instr_sm, trans_instr_sm, jump_instr_sm,
// spec_instr_sm) whose busy flags form the semaphore ctrl_sm waits on, the
// AGU (program counter), the ICU (codec interrupt in) and the IGU
// (interrupt to the DSP).
// Operating part: an 8 x 32 register bank, the ALU, the TrueFalse flag, the
// write-back multiplexer (ALU, DMA address, DMA control, DMA-bus read data)
// and a status register readable from the system bus.
//
// Interface: dma_control / dma_address come from system-bus registers,
// dma_status goes back. rom_* is the system-bus port of the program memory;
// writes land only while dma_control[0] is set. re / we / size / ok /
// odb_address / wdata / rdata is the request interface of the DMA-bus
// master. codec_reg_sel / codec_reg_we / codec_to_odb steer the codec
// register multiplexer. dma_enable low stops the controller and sets its
// program counter to 0; on enable the program starts at address 0, and a
// codec interrupt makes it jump to 0x0C.
//
// Published: the architecture, the instruction set and its encoding, the
// 8 x 32 register bank, the 256 x 16 program memory, the interrupt entry
// 0x0C, write protection of the program memory and the debug mode.
// This design's choices: the bit layout of dma_control and dma_status, the
// second register read port, the rom_rdata and codec_to_odb signals, and
// the dsp_int_ack / dma_int_enable inputs standing for the two interrupt
// bits of the FPGA control register.
//
// dma_status: [7:0] program counter, [10:8] ctrl_sm state, [11] TrueFalse,
// [12] codec interrupt pending, [13] DSP interrupt pending, [14] jump taken,
// [15] an execution machine is busy, [31:16] instruction register.
module apc
  import apc_pkg::*;
#(
  parameter int unsigned    PROG_DEPTH = 256,
  parameter int unsigned    NREGS      = 8,
  parameter logic [7:0]     INT_ADDR   = 8'h0C
) (
  input  logic        clk,
  input  logic        rst_n,
  // system-bus registers
  input  logic [31:0] dma_control,
  input  logic [31:0] dma_address,
  output logic [31:0] dma_status,
  // system-bus port of the program memory
  input  logic [7:0]  rom_address,
  input  logic        rom_we,
  input  logic [15:0] rom_data,
  output logic [15:0] rom_rdata,
  // from the FPGA control register
  input  logic        dma_enable,
  input  logic        codec_int_en,
  input  logic        dma_int_enable,
  input  logic        dsp_int_ack,
  // to the DSP
  output logic        dma_irq,
  // DMA-bus master request interface
  output logic        re,
  output logic        we,
  output logic [1:0]  size,
  input  logic        ok,
  output logic [31:0] odb_address,
  output logic [31:0] wdata,
  input  logic [31:0] rdata,
  // audio port interface
  output logic [2:0]  codec_reg_sel,
  output logic        codec_reg_we,
  output logic        codec_to_odb,
  input  logic        codec2dma_irq,
  output logic        dma2codec_int_ack
);
  // ------------------------------------------------------------ control
  instr_t     ir;
  logic [15:0] prog_q;
  logic [7:0] pc;
  logic       load_ir, exec_en, agu_en;
  logic [2:0] sm_state;
  logic [3:0] busy_flags;

  logic       alu_busy, jmp_busy, spec_busy, trans_busy;
  logic       alu_reg_we, alu_tf_we;
  logic [2:0] alu_raddr, alu_waddr;
  logic [1:0] alu_wsel;
  logic       jump_taken;
  logic [7:0] jump_address;
  logic       clear_codec_irq, igu_trigger, irq_pending;
  logic       int_req, int_ack;
  logic [7:0] int_address;
  logic [2:0] tr_raddr_a, tr_raddr_b, tr_waddr;
  logic       tr_reg_we;

  logic       true_false;

  assign busy_flags = {trans_busy, spec_busy, jmp_busy, alu_busy};

  ctrl_sm u_ctrl_sm (
    .clk, .rst_n,
    .run       (dma_enable),
    .debug_en  (dma_control[DMACTL_DEBUG_EN]),
    .debug_step(dma_control[DMACTL_DEBUG_STEP]),
    .busy_flags,
    .load_ir, .exec_en, .agu_en,
    .state_o   (sm_state)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ir <= '{opcode: OP_NOP, default: '0};
    else if (load_ir) ir <= instr_t'(prog_q);
  end

  prog_mem #(.DEPTH(PROG_DEPTH), .WIDTH(16)) u_prog_mem (
    .clk,
    .addr_a(pc[$clog2(PROG_DEPTH)-1:0]),
    .q_a   (prog_q),
    .addr_b(rom_address[$clog2(PROG_DEPTH)-1:0]),
    .we_b  (rom_we && dma_control[DMACTL_MEM_WE]),
    .d_b   (rom_data),
    .q_b   (rom_rdata)
  );

  alu_instr_sm u_alu_sm (
    .clk, .rst_n, .exec_en, .ir,
    .busy(alu_busy), .reg_we(alu_reg_we), .raddr(alu_raddr),
    .waddr(alu_waddr), .wsel(alu_wsel), .tf_we(alu_tf_we)
  );

  jump_instr_sm u_jump_sm (
    .clk, .rst_n, .exec_en, .ir, .true_false,
    .busy(jmp_busy), .jump_taken, .jump_address
  );

  spec_instr_sm u_spec_sm (
    .clk, .rst_n, .exec_en, .ir, .irq_pending,
    .busy(spec_busy), .clear_codec_irq, .igu_trigger
  );

  trans_instr_sm u_trans_sm (
    .clk, .rst_n, .exec_en, .ir, .ok,
    .busy(trans_busy), .re, .we, .size,
    .raddr_a(tr_raddr_a), .raddr_b(tr_raddr_b),
    .reg_we(tr_reg_we), .waddr(tr_waddr),
    .codec_reg_sel, .codec_reg_we, .codec_to_odb
  );

  agu #(.AW(8)) u_agu (
    .clk, .rst_n,
    .clear      (!dma_enable),
    .enable     (agu_en),
    .load_jump  (jump_taken),
    .new_address(jump_address),
    .int_address,
    .int_req,
    .int_ack,
    .address_out(pc)
  );

  icu #(.AW(8), .INT_ADDRESS(INT_ADDR)) u_icu (
    .clk, .rst_n,
    .codec_irq      (codec2dma_irq),
    .codec_int_en   (codec_int_en && dma_enable),
    .int_ack,
    .clear_codec_irq,
    .int_req,
    .int_address,
    .codec_int_ack  (dma2codec_int_ack)
  );

  igu u_igu (
    .clk, .rst_n,
    .trigger       (igu_trigger),
    .ack           (dsp_int_ack),
    .dma_int_enable,
    .irq_pending,
    .dma_irq
  );

  // ------------------------------------------------------------ operating part
  logic [$clog2(NREGS)-1:0] ra, rb, wa;
  logic [31:0] rd_a, rd_b, alu_y, wb_data;
  logic        alu_zero, rb_we;

  assign ra = trans_busy ? tr_raddr_a : alu_raddr;
  assign rb = tr_raddr_b;
  assign wa = tr_reg_we ? tr_waddr : alu_waddr;
  assign rb_we = alu_reg_we || tr_reg_we;

  always_comb begin
    if (tr_reg_we) wb_data = rdata;
    else begin
      unique case (alu_wsel)
        2'd1:    wb_data = dma_address;
        2'd2:    wb_data = dma_control;
        default: wb_data = alu_y;
      endcase
    end
  end

  reg_bank #(.NREGS(NREGS), .WIDTH(32)) u_reg_bank (
    .clk, .rst_n,
    .write_enable(rb_we),
    .waddr(wa), .wdata(wb_data),
    .raddr_a(ra), .rdata_a(rd_a),
    .raddr_b(rb), .rdata_b(rd_b)
  );

  alu u_alu (.opcode(ir.opcode), .options(ir.options), .a(rd_a), .y(alu_y), .zero(alu_zero));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         true_false <= 1'b0;
    else if (alu_tf_we) true_false <= alu_zero;
  end

  assign odb_address = rd_b;
  assign wdata       = rd_a;

  // status register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dma_status <= '0;
    else dma_status <= {ir, |busy_flags, jump_taken, irq_pending, int_req,
                        true_false, sm_state, pc};
  end

  // A transfer never overlaps another execution machine.
  property p_one_machine;
    @(posedge clk) disable iff (!rst_n) $onehot0(busy_flags);
  endproperty
  assert property (p_one_machine);
endmodule
