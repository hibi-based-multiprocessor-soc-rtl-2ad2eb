// n2h_dma -- Nios-to-HIBI DMA controller.
//
// Moves data between a processor's dual-port RAM and a HIBI wrapper so that
// the processor only sets up transfers and answers interrupts.
//
// Transmit: the processor writes the buffer pointer, word count, HIBI target
// address and command into registers and then the start bit. The start
// request crosses SYNC_STAGES flip-flops (the place where a clock-domain
// boundary between processor and DMA would be; two cycles by default). The
// DMA then reads the RAM (one cycle read latency), writes the HIBI address
// word and then one data word per cycle into the wrapper's transmit FIFO.
// A two-word skid buffer absorbs the read latency, so the stream keeps one
// word per cycle and stops cleanly when the FIFO is full.
//
// Receive: N_RX_CH buffers (channels), each with a RAM pointer and a maximum
// size set by the processor; writing the maximum size arms the channel. When
// data arrive from the wrapper, the lowest armed channel is taken and words
// are written into its buffer until the received HIBI address changes or the
// maximum size is reached. The channel is then marked done and the interrupt
// line is raised; the processor reads the channel's pointer, count and HIBI
// address and writes its bit to RX_ACK, which frees the buffer for another
// transfer. While no channel is free, the wrapper's receive FIFO is not read
// (the wrapper then refuses further words with target full). Receive writes
// have priority over transmit reads on the shared RAM port.
//
// Register map (word addresses on the slave port):
//   0 TX_MEM_ADDR   1 TX_AMOUNT   2 TX_HIBI_ADDR   3 TX_COMM
//   4 CTRL     write bit0 = start; read bit0 = transmit busy
//   5 RX_ACK   read: done mask; write: mask of done channels to free
//   6 RX_STALL read: cycles the receive side waited for a free buffer
//   8+4c+0 CH_MEM_ADDR  8+4c+1 CH_MAX (write arms)  8+4c+2 CH_COUNT  8+4c+3 CH_HIBI_ADDR
// Slave reads are combinational (zero wait states); writes take effect at the
// clock edge.
//
// From the description: Avalon-to-FIFO conversion, transmit from RAM into the
// wrapper FIFO, receive until address change or maximum size, interrupt with
// a pointer, buffer release by the processor, several pending transfers
// (four), two-cycle start synchronisation and one-cycle RAM latency. The
// register map, the channel choice and the port priority are this design's.
module n2h_dma
  import hibi_pkg::*;
#(
  parameter int unsigned MEM_AW      = 8,   // 256 words = 8 kbit buffer
  parameter int unsigned N_RX_CH     = 4,   // pending receive transfers
  parameter int unsigned SYNC_STAGES = 2,
  localparam int unsigned S_AW       = $clog2(8 + 4 * N_RX_CH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // Avalon slave (processor)
  input  logic [S_AW-1:0]      avs_address,
  input  logic                 avs_write,
  input  logic                 avs_read,
  input  logic [DATA_W-1:0]    avs_writedata,
  output logic [DATA_W-1:0]    avs_readdata,
  output logic                 irq,
  // RAM port (one cycle read latency)
  output logic [MEM_AW-1:0]    mem_addr,
  output logic                 mem_we,
  output logic [DATA_W-1:0]    mem_wdata,
  input  logic [DATA_W-1:0]    mem_rdata,
  // HIBI wrapper transmit FIFO
  output logic                 tx_we,
  output hibi_word_t           tx_word,
  input  logic                 tx_full,
  // HIBI wrapper receive FIFO
  input  hibi_word_t           rx_word,
  input  logic                 rx_empty,
  output logic                 rx_re
);
  localparam int unsigned CW = $clog2(N_RX_CH);

  typedef enum logic [1:0] {CH_OFF, CH_FREE, CH_BUSY, CH_DONE} ch_state_e;

  // ------------------------------------------------------------ registers
  logic [MEM_AW-1:0] tx_mem_addr_r;
  logic [MEM_AW:0]   tx_amount_r;
  logic [DATA_W-1:0] tx_hibi_addr_r;
  hibi_cmd_e         tx_comm_r;
  logic              tx_busy;
  logic [DATA_W-1:0] rx_stall_cnt;

  logic [MEM_AW-1:0] ch_mem   [N_RX_CH];
  logic [MEM_AW:0]   ch_max   [N_RX_CH];
  logic [MEM_AW:0]   ch_cnt   [N_RX_CH];
  logic [DATA_W-1:0] ch_haddr [N_RX_CH];
  ch_state_e         ch_state [N_RX_CH];
  logic [N_RX_CH-1:0] done_mask;

  always_comb
    for (int c = 0; c < N_RX_CH; c++) done_mask[c] = (ch_state[c] == CH_DONE);
  assign irq = |done_mask;

  wire wr_ctrl_start = avs_write && avs_address == S_AW'(4) && avs_writedata[0] && !tx_busy;

  always_comb begin
    avs_readdata = '0;
    unique case (avs_address)
      S_AW'(0): avs_readdata = DATA_W'(tx_mem_addr_r);
      S_AW'(1): avs_readdata = DATA_W'(tx_amount_r);
      S_AW'(2): avs_readdata = tx_hibi_addr_r;
      S_AW'(3): avs_readdata = DATA_W'(tx_comm_r);
      S_AW'(4): avs_readdata = DATA_W'(tx_busy);
      S_AW'(5): avs_readdata = DATA_W'(done_mask);
      S_AW'(6): avs_readdata = rx_stall_cnt;
      default:
        for (int c = 0; c < N_RX_CH; c++) begin
          if (avs_address == S_AW'(8 + 4 * c))     avs_readdata = DATA_W'(ch_mem[c]);
          if (avs_address == S_AW'(8 + 4 * c + 1)) avs_readdata = DATA_W'(ch_max[c]);
          if (avs_address == S_AW'(8 + 4 * c + 2)) avs_readdata = DATA_W'(ch_cnt[c]);
          if (avs_address == S_AW'(8 + 4 * c + 3)) avs_readdata = ch_haddr[c];
        end
    endcase
    if (!avs_read) avs_readdata = '0;
  end

  // ------------------------------------------------------------- transmit
  logic [SYNC_STAGES-1:0] start_sync;
  logic              tx_run, addr_sent, inflight;
  logic [MEM_AW-1:0] rd_ptr;
  logic [MEM_AW:0]   rd_left, push_left;
  logic              issue, drain, rx_mem_use;
  logic [DATA_W-1:0] skid_head;
  logic              skid_empty;
  logic [1:0]        skid_cnt;
  logic              avail, skid_rd, skid_wr;
  logic [DATA_W-1:0] head;

  hibi_fifo #(.WIDTH(DATA_W), .DEPTH(2)) u_skid (
    .clk, .rst_n, .wr_en(skid_wr), .wr_data(mem_rdata), .full(),
    .rd_en(skid_rd), .rd_data(skid_head), .empty(skid_empty), .count(skid_cnt));

  // The word just read from RAM bypasses the skid buffer when it is empty.
  always_comb begin
    avail   = !skid_empty || inflight;
    head    = skid_empty ? mem_rdata : skid_head;
    tx_we   = 1'b0;
    tx_word = '{av: 1'b0, comm: tx_comm_r, data: head};
    drain   = 1'b0;
    if (tx_run && !addr_sent) begin
      tx_word = '{av: 1'b1, comm: tx_comm_r, data: tx_hibi_addr_r};
      tx_we   = !tx_full;
    end else if (tx_run && avail) begin
      tx_we   = !tx_full;
      drain   = !tx_full;
    end
    skid_wr = inflight && !(skid_empty && drain);
    skid_rd = drain && !skid_empty;
    issue   = tx_run && (rd_left != '0) && !rx_mem_use &&
              ({1'b0, skid_cnt} + 3'(inflight) - 3'(drain) <= 3'd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_sync <= '0;
      tx_busy    <= 1'b0;
      tx_run     <= 1'b0;
      addr_sent  <= 1'b0;
      inflight   <= 1'b0;
      rd_ptr     <= '0;
      rd_left    <= '0;
      push_left  <= '0;
    end else begin
      start_sync <= {start_sync[SYNC_STAGES-2:0], wr_ctrl_start};
      inflight   <= issue;
      if (wr_ctrl_start) tx_busy <= 1'b1;
      if (start_sync[SYNC_STAGES-1]) begin
        tx_run    <= 1'b1;
        addr_sent <= 1'b0;
        rd_ptr    <= tx_mem_addr_r;
        rd_left   <= tx_amount_r;
        push_left <= tx_amount_r;
      end else if (tx_run) begin
        if (tx_we && !addr_sent) addr_sent <= 1'b1;
        if (issue) begin
          rd_ptr  <= rd_ptr + 1'b1;
          rd_left <= rd_left - 1'b1;
        end
        if (drain) push_left <= push_left - 1'b1;
        if (addr_sent && (push_left == '0 || (drain && push_left == 1))) begin
          tx_run  <= 1'b0;
          tx_busy <= 1'b0;
        end
      end
    end
  end

  // -------------------------------------------------------------- receive
  logic              active, addr_valid;
  logic [CW-1:0]     cur_ch, free_idx;
  logic              free_any;
  logic [DATA_W-1:0] cur_addr;
  logic              do_close, do_open, do_write, do_stall;

  always_comb begin
    free_any = 1'b0;
    free_idx = '0;
    for (int c = N_RX_CH - 1; c >= 0; c--)
      if (ch_state[c] == CH_FREE) begin
        free_any = 1'b1;
        free_idx = CW'(c);
      end
  end

  always_comb begin
    rx_re    = 1'b0;
    do_close = 1'b0;
    do_open  = 1'b0;
    do_write = 1'b0;
    do_stall = 1'b0;
    if (!rx_empty) begin
      if (rx_word.av) begin
        if (addr_valid && rx_word.data == cur_addr) rx_re = 1'b1;  // same transfer resumes
        else if (active)                            do_close = 1'b1; // address changed
        else                                        rx_re = 1'b1;    // new transfer
      end else if (active) begin
        do_write = 1'b1;
        rx_re    = 1'b1;
        if (ch_cnt[cur_ch] + 1'b1 >= ch_max[cur_ch]) do_close = 1'b1;
      end else if (!addr_valid) begin
        rx_re = 1'b1;                                // data without address: dropped
      end else if (free_any) begin
        do_open = 1'b1;
      end else begin
        do_stall = 1'b1;
      end
    end
    rx_mem_use = do_write;
    mem_we     = do_write;
    mem_wdata  = rx_word.data;
    mem_addr   = do_write ? ch_mem[cur_ch] + ch_cnt[cur_ch][MEM_AW-1:0] : rd_ptr;
  end

  // register writes and channel bookkeeping
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_mem_addr_r  <= '0;
      tx_amount_r    <= '0;
      tx_hibi_addr_r <= '0;
      tx_comm_r      <= CMD_WR_DATA;
      rx_stall_cnt   <= '0;
      active         <= 1'b0;
      addr_valid     <= 1'b0;
      cur_ch         <= '0;
      cur_addr       <= '0;
      for (int c = 0; c < N_RX_CH; c++) begin
        ch_mem[c]   <= '0;
        ch_max[c]   <= '0;
        ch_cnt[c]   <= '0;
        ch_haddr[c] <= '0;
        ch_state[c] <= CH_OFF;
      end
    end else begin
      // receive engine
      if (rx_re && rx_word.av) begin
        cur_addr   <= rx_word.data;
        addr_valid <= 1'b1;
      end
      if (do_open) begin
        active             <= 1'b1;
        cur_ch             <= free_idx;
        ch_state[free_idx] <= CH_BUSY;
        ch_cnt[free_idx]   <= '0;
        ch_haddr[free_idx] <= cur_addr;
      end
      if (do_write) ch_cnt[cur_ch] <= ch_cnt[cur_ch] + 1'b1;
      if (do_close) begin
        active           <= 1'b0;
        ch_state[cur_ch] <= CH_DONE;
      end
      if (do_stall) rx_stall_cnt <= rx_stall_cnt + 1'b1;
      // processor writes
      if (avs_write) begin
        unique case (avs_address)
          S_AW'(0): tx_mem_addr_r  <= avs_writedata[MEM_AW-1:0];
          S_AW'(1): tx_amount_r    <= avs_writedata[MEM_AW:0];
          S_AW'(2): tx_hibi_addr_r <= avs_writedata;
          S_AW'(3): tx_comm_r      <= hibi_cmd_e'(avs_writedata[CMD_W-1:0]);
          S_AW'(5):
            for (int c = 0; c < N_RX_CH; c++)
              if (avs_writedata[c] && ch_state[c] == CH_DONE) begin
                ch_state[c] <= CH_FREE;
                ch_cnt[c]   <= '0;
              end
          default:
            for (int c = 0; c < N_RX_CH; c++) begin
              if (avs_address == S_AW'(8 + 4 * c) && ch_state[c] != CH_BUSY)
                ch_mem[c] <= avs_writedata[MEM_AW-1:0];
              if (avs_address == S_AW'(8 + 4 * c + 1) && ch_state[c] != CH_BUSY) begin
                ch_max[c]   <= avs_writedata[MEM_AW:0];
                ch_cnt[c]   <= '0;
                ch_state[c] <= CH_FREE;
              end
            end
        endcase
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(tx_we && tx_full))
    else $error("n2h_dma: write into a full wrapper FIFO");
  assert property (@(posedge clk) disable iff (!rst_n) !(rx_re && rx_empty))
    else $error("n2h_dma: read from an empty wrapper FIFO");
endmodule
