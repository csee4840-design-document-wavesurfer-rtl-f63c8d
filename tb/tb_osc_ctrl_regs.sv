// tb_osc_ctrl_regs: random register traffic against a reference model.
//
// Writes random values to random voices and register words, reads them
// back through the host port (control reads back bits [2:0], the reserved
// word reads zero), and checks the playback view of every voice: step,
// table index, the gate (on only for control code 2) and the restart
// request (set by code 3, cleared when the sequencer visits the voice,
// kept when a new reset is written in the same cycle).
module tb_osc_ctrl_regs;
  import wavesurfer_pkg::*;

  logic        clk = 1'b0, rst;
  logic        wr_en, seq_active;
  logic [4:0]  wr_voice, rd_voice, seq_voice;
  osc_reg_e    wr_reg, rd_reg;
  logic [15:0] wr_data, rd_data;
  voice_cfg_t  seq_cfg;
  int          checks = 0, failures = 0;

  logic [15:0] m_step [32], m_table [32];
  logic [2:0]  m_ctrl [32];
  logic        m_clr  [32];

  always #5 clk = ~clk;

  osc_ctrl_regs dut (.*);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic check_all();
    for (int v = 0; v < 32; v++) begin
      seq_voice = 5'(v);
      rd_voice  = 5'(v);
      rd_reg = REG_STEP;  #1; check("read step",  rd_data == m_step[v]);
      rd_reg = REG_CTRL;  #1; check("read ctrl",  rd_data == {13'b0, m_ctrl[v]});
      rd_reg = REG_TABLE; #1; check("read table", rd_data == m_table[v]);
      rd_reg = REG_RSVD;  #1; check("read reserved", rd_data == 16'h0);
      check("cfg step",  seq_cfg.step == m_step[v]);
      check("cfg table", seq_cfg.table_sel == m_table[v]);
      check("cfg gate",  seq_cfg.note_on == (m_ctrl[v] == CTRL_START));
      check("cfg clr",   seq_cfg.phase_clr == m_clr[v]);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; wr_en = 0; seq_active = 0; wr_voice = '0; rd_voice = '0;
    seq_voice = '0; wr_reg = REG_STEP; rd_reg = REG_STEP; wr_data = '0;
    for (int v = 0; v < 32; v++) begin
      m_step[v] = '0; m_table[v] = '0; m_ctrl[v] = '0; m_clr[v] = 1'b0;
    end
    repeat (2) @(negedge clk);
    rst = 0;
    check_all();
    for (int n = 0; n < 3000; n++) begin
      wr_en      = ($urandom_range(3) != 0);
      wr_voice   = 5'($urandom);
      wr_reg     = osc_reg_e'($urandom_range(3));
      wr_data    = 16'($urandom);
      if (wr_reg == REG_CTRL && $urandom_range(1) == 1) wr_data[2:0] = 3'($urandom_range(3) + 0);
      seq_active = ($urandom_range(2) == 0);
      seq_voice  = (n % 5 == 0) ? wr_voice : 5'($urandom);
      @(posedge clk);
      if (seq_active) m_clr[seq_voice] = 1'b0;
      if (wr_en) begin
        case (wr_reg)
          REG_STEP:  m_step[wr_voice]  = wr_data;
          REG_CTRL: begin
            m_ctrl[wr_voice] = wr_data[2:0];
            if (wr_data[2:0] == CTRL_RESET) m_clr[wr_voice] = 1'b1;
          end
          REG_TABLE: m_table[wr_voice] = wr_data;
          default: ;
        endcase
      end
      @(negedge clk);
      wr_en = 0; seq_active = 0;
      if (n % 50 == 0) check_all();
      else begin
        seq_voice = wr_voice; rd_voice = wr_voice; rd_reg = wr_reg; #1;
        case (wr_reg)
          REG_STEP:  check("readback step",  rd_data == m_step[wr_voice]);
          REG_CTRL:  check("readback ctrl",  rd_data == {13'b0, m_ctrl[wr_voice]});
          REG_TABLE: check("readback table", rd_data == m_table[wr_voice]);
          default:   check("readback reserved", rd_data == 16'h0);
        endcase
        check("gate of written voice", seq_cfg.note_on == (m_ctrl[wr_voice] == CTRL_START));
        check("restart of written voice", seq_cfg.phase_clr == m_clr[wr_voice]);
      end
    end
    // synchronous reset clears everything
    rst = 1;
    @(negedge clk);
    rst = 0;
    for (int v = 0; v < 32; v++) begin
      m_step[v] = '0; m_table[v] = '0; m_ctrl[v] = '0; m_clr[v] = 1'b0;
    end
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
