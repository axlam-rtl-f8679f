// pe_controller: sequencer of the unified PE.
//
// Accepts one matrix-multiply command (mm_cmd_t, see axlam_pkg) through a
// valid/ready handshake and walks its tiles. The loop order keeps one R
// operand set (a group of eight columns) in place while every L row group in
// the buffers is streamed against it, then moves to the next R group: the
// operand that is not stationary is the one refreshed after each operand
// set, as in the source design. For each tile it issues k_words consecutive
// reads of all sixteen operand buffers, one word per cycle, with no bubbles
// between tiles, so the PE does 1024 multiplications in every cycle of a
// command.
//
// Addressing: L row group i of the command starts at l_base + i*k_words, R
// column group j at r_base + j*k_words, and tile (i,j) goes to A.SRAM entry
// acc_base + j*n_l + i. When accumulate is set the controller reads that
// entry so that the PE adds the new sum to it (a partial sum over an inner
// dimension split between commands).
//
// Timing: buf_rd_* are issued in the cycle the word is fetched; pe_* are the
// same information one cycle later, aligned with the buffer read data;
// acc_rd_* is issued one cycle after the first read of a tile. After the
// last read the controller waits PIPE_DRAIN cycles until the last tile is in
// the A.SRAM, then pulses done and takes the next command, so a command may
// safely continue partial sums written by the one before. Command format,
// loop order and handshake are this RTL's choices.
module pe_controller
  import axlam_pkg::*;
#(
  parameter int unsigned BUF_DEPTH   = 512,
  parameter int unsigned ACC_ENTRIES = 64,
  parameter int unsigned BUF_AW      = $clog2(BUF_DEPTH),
  parameter int unsigned ACC_AW      = $clog2(ACC_ENTRIES),
  parameter int unsigned PIPE_DRAIN  = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  // command
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  mm_cmd_t            cmd,
  output logic               busy,
  output logic               done,
  // operand buffer reads (all L buffers share l_addr, all R buffers r_addr)
  output logic               buf_rd_en,
  output logic [BUF_AW-1:0]  l_addr,
  output logic [BUF_AW-1:0]  r_addr,
  // PE control, aligned with the buffer read data
  output logic               pe_valid,
  output logic               pe_first,
  output logic               pe_last,
  output logic               pe_init_use,
  output logic [ACC_AW-1:0]  pe_addr,
  // A.SRAM read of the partial sum to continue
  output logic               acc_rd_en,
  output logic [ACC_AW-1:0]  acc_rd_addr
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;

  state_t              state;
  mm_cmd_t             c;
  logic [9:0]          k;          // word within the tile
  logic [6:0]          i;          // L row group
  logic [6:0]          j;          // R column group
  logic [BUF_AW-1:0]   l_ptr;
  logic [BUF_AW-1:0]   r_grp;      // first word of the current R group
  logic [ACC_AW-1:0]   tile_addr;
  logic [2:0]          drain_cnt;

  logic tile_last, cmd_last;

  assign cmd_ready   = (state == S_IDLE);
  assign busy        = (state != S_IDLE);
  assign buf_rd_en   = (state == S_RUN);
  assign l_addr      = l_ptr;
  assign r_addr      = r_grp + BUF_AW'(k);
  assign tile_last   = (k == c.k_words - 10'd1);
  assign cmd_last    = tile_last && (i == c.n_l - 7'd1) && (j == c.n_r - 7'd1);
  assign acc_rd_en   = pe_valid && pe_first && pe_init_use;
  assign acc_rd_addr = pe_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      c         <= '0;
      k         <= '0;
      i         <= '0;
      j         <= '0;
      l_ptr     <= '0;
      r_grp     <= '0;
      tile_addr <= '0;
      drain_cnt <= '0;
      done      <= 1'b0;
    end else begin
      // command rules: sizes of at least one, every access inside the buffers
      if (state == S_IDLE && cmd_valid) begin
        assert (cmd.k_words != 0 && cmd.n_l != 0 && cmd.n_r != 0)
          else $error("pe_controller: empty command");
        assert (32'(cmd.l_base) + 32'(cmd.n_l) * 32'(cmd.k_words) <= BUF_DEPTH &&
                32'(cmd.r_base) + 32'(cmd.n_r) * 32'(cmd.k_words) <= BUF_DEPTH)
          else $error("pe_controller: command reads past the operand buffers");
        assert (32'(cmd.acc_base) + 32'(cmd.n_l) * 32'(cmd.n_r) <= ACC_ENTRIES)
          else $error("pe_controller: command writes past the A.SRAM");
      end
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (cmd_valid) begin
            c         <= cmd;
            k         <= '0;
            i         <= '0;
            j         <= '0;
            l_ptr     <= BUF_AW'(cmd.l_base);
            r_grp     <= BUF_AW'(cmd.r_base);
            tile_addr <= ACC_AW'(cmd.acc_base);
            state     <= S_RUN;
          end
        end
        S_RUN: begin
          if (cmd_last) begin
            state     <= S_DRAIN;
            drain_cnt <= 3'(PIPE_DRAIN);
          end else if (tile_last) begin
            k         <= '0;
            tile_addr <= tile_addr + 1'b1;
            if (i == c.n_l - 7'd1) begin
              // R operand set finished: refresh R, restart the L groups
              i     <= '0;
              j     <= j + 1'b1;
              l_ptr <= BUF_AW'(c.l_base);
              r_grp <= r_grp + BUF_AW'(c.k_words);
            end else begin
              i     <= i + 1'b1;
              l_ptr <= l_ptr + 1'b1;
            end
          end else begin
            k     <= k + 1'b1;
            l_ptr <= l_ptr + 1'b1;
          end
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt - 1'b1;
          if (drain_cnt == 3'd1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // control that travels with the read data
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pe_valid    <= 1'b0;
      pe_first    <= 1'b0;
      pe_last     <= 1'b0;
      pe_init_use <= 1'b0;
      pe_addr     <= '0;
    end else begin
      pe_valid    <= (state == S_RUN);
      pe_first    <= (state == S_RUN) && (k == '0);
      pe_last     <= (state == S_RUN) && tile_last;
      pe_init_use <= c.accumulate;
      pe_addr     <= tile_addr;
    end
  end

endmodule
