// tb_ddr_block_rw: the write-then-read scenario of a 128-bit data block.
//
// With the controller at its default parameters and the behavioural DDR
// SDRAM model, the host writes 128-bit blocks (8 words of 16 bits) as two
// WRITEA commands to consecutive 4-word groups of one row, issuing the
// second as soon as the first is acknowledged, and later reads each block
// back the same way with two READA commands. Checked: the second command of
// each pair is chained (CMDACK exactly 4 cycles after the first), the
// 8 read words arrive on DATAOUT in 8 consecutive cycles starting CL+3
// cycles after the first CMDACK and equal the written block, and the memory
// model reports no protocol or timing violation. Blocks go to address 0 and
// to other rows, banks and chips.
module tb_ddr_block_rw;
  timeunit 1ns; timeprecision 100ps;
  import ddr_pkg::*;

  localparam int CL = 2;
  localparam int NBLK = 6;

  logic CLK = 0, RESET = 1;
  logic [2:0] CMD = 3'b000;
  logic [ASIZE-1:0] ADDR = '0;
  logic CMDACK, INIT_DONE;
  logic [DSIZE-1:0] DATAIN = '0, DATAOUT;
  logic [DM_W-1:0] DM = '0;
  logic SCLK, SCLK_N, CKE, RAS_N, CAS_N, WE_N, DQ_OE, DQS_OE;
  logic [SA_W-1:0] SA;
  logic [BANK_W-1:0] BA;
  logic [CS_W-1:0] CS_N;
  logic [DQS_W-1:0] DQM, DQS_O;
  logic [DQ_W-1:0] DQ_O, DQ_I;
  logic dq_m_oe;

  always #5 CLK = ~CLK;

  ddr_sdram_ctrl dut (.*);

  ddr_sdram_model #(.CL(CL)) mem (
    .ck(SCLK), .ck_n(SCLK_N), .cke(CKE), .cs_n(CS_N), .ras_n(RAS_N), .cas_n(CAS_N),
    .we_n(WE_N), .ba(BA), .a(SA), .dqm(DQM[0]), .dq_c(DQ_O), .dq_c_oe(DQ_OE),
    .dqs_c(DQS_O[0]), .dqs_c_oe(DQS_OE), .dq_m(DQ_I), .dq_m_oe(dq_m_oe)
  );

  int checks = 0, failures = 0;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  logic [127:0] blk [NBLK];
  logic [21:0]  base [NBLK];

  // two commands back to back; returns the cycles between the two CMDACKs
  task automatic pair(logic [2:0] c, logic [21:0] a, int blkno, output int gap);
    int n;
    CMD = c; ADDR = a;
    do @(negedge CLK); while (!CMDACK);
    ADDR = a + 22'd4;          // next 4-word group, same row
    n = 0;
    if (c == 3'b010)
      for (int w = 0; w < 8; w++) begin
        @(negedge CLK);
        n++;
        if (CMDACK) begin gap = n; CMD = 3'b000; end
        DATAIN = blk[blkno][16*w +: 16];
      end
    else begin
      for (int w = 0; w < CL + 2 + 8; w++) begin
        @(negedge CLK);
        n++;
        if (CMDACK) begin gap = n; CMD = 3'b000; end
        if (n >= CL + 3) begin
          chk(DATAOUT == blk[blkno][16*(n-CL-3) +: 16],
              $sformatf("block %0d word %0d: got %h expected %h", blkno, n - CL - 3,
                        DATAOUT, blk[blkno][16*(n-CL-3) +: 16]));
        end
      end
    end
    CMD = 3'b000;
  endtask

  initial begin
    int gap;
    base[0] = 22'h000000;          // address 0
    base[1] = 22'h000010;
    base[2] = 22'h1fff88;          // row fff, bank 3, chip 0
    base[3] = 22'h200100;          // chip 1
    base[4] = 22'h2abc80;
    base[5] = 22'h000018;
    for (int b = 0; b < NBLK; b++) blk[b] = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(posedge CLK);
    @(negedge CLK) RESET = 0;
    wait (INIT_DONE);
    @(negedge CLK);
    for (int b = 0; b < NBLK; b++) begin
      gap = 0;
      pair(3'b010, base[b], b, gap);
      chk(gap == 4, $sformatf("write block %0d chained, CMDACKs %0d apart", b, gap));
      repeat (4) @(negedge CLK);
    end
    for (int b = NBLK - 1; b >= 0; b--) begin
      gap = 0;
      pair(3'b001, base[b], b, gap);
      chk(gap == 4, $sformatf("read block %0d chained, CMDACKs %0d apart", b, gap));
    end
    repeat (20) @(negedge CLK);
    chk(mem.errors == 0, $sformatf("memory model errors %0d", mem.errors));
    chk(mem.n_wr == 2 * NBLK && mem.n_rd == 2 * NBLK, "one WRITE/READ per 4 words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge CLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
