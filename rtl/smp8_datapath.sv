// smp8_datapath: the SMP8 datapath.
//
// Holds the four state elements of the machine: the 4-bit PC, the 8-bit
// accumulator AC, the 8-bit operand register R and the 1-bit zero flag, plus
// the 16 x 8 data memory. In one clock cycle:
//   * next PC = jump ? operand : PC + 1;
//   * the ALU computes f(AC, R) with f chosen by ctrl.alu;
//   * AC input = mvr ? R : (load ? M[operand] : ALU result), written
//     unless ctrl.nop;
//   * R <- AC when ctrl.mva;
//   * M[operand] <- AC when ctrl.store;
//   * the zero flag takes the ALU's zero output on every cycle, whatever the
//     instruction, and is what JMPZ/JPNZ of the next instruction test.
// This structure is the original design's. Two departures, both this
// design's: the original clocked AC with ~nop & clk and R with the mva
// strobe; here both are clock enables on the single clock. Because R was
// loaded at the mva strobe, early in the MVAC cycle, the original ALU already
// saw the new R (= AC) during MVAC, so MVAC left AC and computed the flag from
// AC & AC. The ALU's b operand is therefore bypassed to AC during MVAC, which
// keeps that behaviour. All registers reset asynchronously to 0 (active high).
module smp8_datapath
  import smp8_pkg::*;
#(
  parameter mem_image_t DMEM_INIT = TEST1_DMEM
) (
  input  logic  clk,
  input  logic  reset,
  input  ctrl_t ctrl,
  output logic  zero,
  output addr_t pc,
  input  addr_t operand,  // operand: data address or jump target
  output word_t ac
);

  addr_t pcplus1, pcnext;
  word_t aluout, ldout, acnext, r, alu_b, datamem;
  logic  zeronext;

  // Next-PC logic.
  smp8_flopr #(.WIDTH(ADDR_W)) u_pcreg (
    .clk, .reset, .en(1'b1), .d(pcnext), .q(pc)
  );
  smp8_adder #(.WIDTH(ADDR_W)) u_pcadd1 (
    .a(pc), .b(addr_t'(1)), .y(pcplus1)
  );
  smp8_mux2 #(.WIDTH(ADDR_W)) u_pcmux (
    .d0(pcplus1), .d1(operand), .s(ctrl.jump), .y(pcnext)
  );

  // Accumulator and R.
  smp8_flopr #(.WIDTH(DATA_W)) u_ac_reg (
    .clk, .reset, .en(~ctrl.nop), .d(acnext), .q(ac)
  );
  smp8_flopr #(.WIDTH(DATA_W)) u_r_reg (
    .clk, .reset, .en(ctrl.mva), .d(ac), .q(r)
  );
  smp8_mux2 #(.WIDTH(DATA_W)) u_ldmux (
    .d0(aluout), .d1(datamem), .s(ctrl.load), .y(ldout)
  );
  smp8_mux2 #(.WIDTH(DATA_W)) u_mvmux (
    .d0(ldout), .d1(r), .s(ctrl.mvr), .y(acnext)
  );

  // Data memory, addressed by the operand nibble.
  smp8_dmem #(.INIT(DMEM_INIT)) u_dmem (
    .clk, .a(operand), .we(ctrl.store), .wd(ac), .rd(datamem)
  );

  // ALU and zero flag. During MVAC the b operand is the value R is taking.
  smp8_mux2 #(.WIDTH(DATA_W)) u_bmux (
    .d0(r), .d1(ac), .s(ctrl.mva), .y(alu_b)
  );
  smp8_alu u_alu (
    .a(ac), .b(alu_b), .sel(ctrl.alu), .y(aluout), .zero(zeronext)
  );
  smp8_flopr #(.WIDTH(1)) u_zeroreg (
    .clk, .reset, .en(1'b1), .d(zeronext), .q(zero)
  );

endmodule
