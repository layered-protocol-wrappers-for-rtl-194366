// frame_processor: AAL5 segmentation and reassembly layer between the cell
// processor and the IP processor.
//
// Reassembly (cells in, frame words out): for each cell of the application
// flow the two header words are stripped and the 12 payload words are passed
// up with dataen. The first payload word of a frame carries sof; a cell whose
// header has the AAL5 end-of-frame bit (PTI bit 0, cell word 0 bit 1) set
// ends the frame and its last word carries eof. OAM cells (PTI bit 2 set)
// are discarded. The CRC-32 of all payload words of a frame is computed on
// the fly; at eof the register must hold the AAL5 residue, and crc_ok or
// crc_bad pulses. Frames are passed up whatever their CRC: dropping them
// would need a buffer the size of the largest frame. Output is registered,
// one clock after the cell word. The header of the first cell of each frame
// is kept (PTI cleared) as the header of the cells sent back.
//
// Segmentation (frame words in, cells out): frame words from above are
// written into a FIFO of SEG_DEPTH words. A cell is started when the cell
// processor can take one (cell_out_tca) and the FIFO holds 12 words or the
// end of a frame. The cell is the kept header (end-of-frame bit set when the
// frame ends inside this cell), a zero HEC word (filled in by the cell
// processor) and 12 payload words; a frame that does not fill its last cell
// is padded with zero words. The CRC-32 of the outgoing frame is computed
// as it is sent and its complement replaces the frame's last word, which is
// the CRC field of the AAL5 trailer. up_in_tca is high while the FIFO has
// SEG_SLACK free words. cell_in_tca is up_out_tca registered.
//
// The split into CRC check, frame detection, cell segmentation and CRC
// generation follows the document; the FIFO size, padding rule and header
// reuse are this design's choices.
module frame_processor
  import lpw_pkg::*;
#(
  parameter int SEG_DEPTH = 64,
  parameter int SEG_SLACK = 24
) (
  input  logic       clk,
  input  logic       rst_n,
  // cells from / to the cell processor
  input  cell_word_t cell_in,
  output logic       cell_in_tca,
  output cell_word_t cell_out,
  input  logic       cell_out_tca,
  // frame words to / from the upper layer
  output lpw_word_t  up_out,
  input  logic       up_out_tca,
  input  lpw_word_t  up_in,
  output logic       up_in_tca,
  // event strobes
  output logic       crc_ok,
  output logic       crc_bad
);
  localparam int AW = $clog2(SEG_DEPTH);

  // ------------------------------------------------------------ reassembly
  logic [3:0]  r_idx;
  logic [31:0] r_hdr_keep;   // header used for outgoing cells
  logic        r_last;       // current cell ends the frame
  logic        r_oam;        // current cell is not user data
  logic        r_in_frame;   // a frame has started and not ended
  logic [31:0] r_crc;

  wire        r_data_word = cell_in.valid && !cell_in.soc && r_idx >= 4'd2 && !r_oam;
  wire        r_eof       = r_data_word && r_last && r_idx == 4'(CELL_WORDS - 1);
  wire [31:0] r_crc_next  = crc32_word(r_crc, cell_in.data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_idx      <= '0;
      r_hdr_keep <= '0;
      r_last     <= 1'b0;
      r_oam      <= 1'b0;
      r_in_frame <= 1'b0;
      r_crc      <= '1;
      up_out     <= '0;
      crc_ok     <= 1'b0;
      crc_bad    <= 1'b0;
      cell_in_tca <= 1'b0;
    end else begin
      cell_in_tca <= up_out_tca;
      crc_ok      <= 1'b0;
      crc_bad     <= 1'b0;
      if (cell_in.valid) begin
        if (cell_in.soc) begin
          r_idx  <= 4'd1;
          r_last <= cell_in.data[1];
          r_oam  <= cell_in.data[3];
          if (!r_in_frame && !cell_in.data[3]) r_hdr_keep <= cell_in.data & 32'hFFFF_FFF1;
        end else begin
          r_idx <= r_idx + 4'd1;
        end
      end
      up_out <= '0;
      if (r_data_word) begin
        up_out.data   <= cell_in.data;
        up_out.dataen <= 1'b1;
        up_out.sof    <= !r_in_frame;
        up_out.eof    <= r_eof;
        r_in_frame    <= !r_eof;
        if (r_eof) begin
          r_crc   <= '1;
          crc_ok  <= (r_crc_next == AAL5_RESIDUE);
          crc_bad <= (r_crc_next != AAL5_RESIDUE);
        end else begin
          r_crc <= r_crc_next;
        end
      end
    end
  end

  // ---------------------------------------------------------- segmentation
  logic [31:0] f_data [SEG_DEPTH];
  logic [SEG_DEPTH-1:0] f_eof;
  logic [AW:0] f_wr, f_rd, f_count;
  logic [AW:0] f_eofs;           // number of frame ends held
  logic        f_pop;
  logic        s_busy;
  logic [3:0]  s_idx;
  logic        s_done;           // frame ended earlier in this cell: pad
  logic        s_eof_in_cell;    // a frame end lies in the next 12 words
  logic [31:0] s_crc;
  logic        s_start;

  assign f_count   = f_wr - f_rd;
  assign up_in_tca = (SEG_DEPTH - int'(f_count)) >= SEG_SLACK;

  always_comb begin
    s_eof_in_cell = 1'b0;
    for (int k = 0; k < PAYLOAD_WORDS; k++) begin
      if (k < int'(f_count) && f_eof[AW'(int'(f_rd[AW-1:0]) + k)]) s_eof_in_cell = 1'b1;
    end
  end

  assign s_start = !s_busy && cell_out_tca && (int'(f_count) >= PAYLOAD_WORDS || f_eofs != '0);
  assign f_pop   = s_busy && s_idx >= 4'd2 && !s_done && f_count != '0;

  wire [31:0] f_head     = f_data[f_rd[AW-1:0]];
  wire        f_head_eof = f_eof[f_rd[AW-1:0]];

  always_ff @(posedge clk) begin
    if (up_in.dataen && f_count != (AW+1)'(SEG_DEPTH)) f_data[f_wr[AW-1:0]] <= up_in.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_wr   <= '0;
      f_rd   <= '0;
      f_eof  <= '0;
      f_eofs <= '0;
      s_busy <= 1'b0;
      s_idx  <= '0;
      s_done <= 1'b0;
      s_crc  <= '1;
      cell_out   <= '0;
    end else begin
      if (up_in.dataen && f_count != (AW+1)'(SEG_DEPTH)) begin
        f_eof[f_wr[AW-1:0]] <= up_in.eof;
        f_wr <= f_wr + 1'b1;
      end
      if (f_pop) f_rd <= f_rd + 1'b1;
      f_eofs <= f_eofs + (AW+1)'(up_in.dataen && up_in.eof && f_count != (AW+1)'(SEG_DEPTH))
                       - (AW+1)'(f_pop && f_head_eof);

      cell_out <= '0;
      if (s_start) begin
        s_busy     <= 1'b1;
        s_idx      <= 4'd1;
        s_done     <= 1'b0;
        cell_out.valid <= 1'b1;
        cell_out.soc   <= 1'b1;
        cell_out.data  <= r_hdr_keep | (s_eof_in_cell ? 32'h2 : 32'h0);
      end else if (s_busy) begin
        cell_out.valid <= 1'b1;
        s_idx <= s_idx + 4'd1;
        if (s_idx == 4'(CELL_WORDS - 1)) s_busy <= 1'b0;
        if (s_idx == 4'd1) begin
          cell_out.data <= 32'h0;
        end else if (f_pop) begin
          if (f_head_eof) begin
            cell_out.data <= ~s_crc;
            s_crc  <= '1;
            s_done <= 1'b1;
          end else begin
            cell_out.data <= f_head;
            s_crc <= crc32_word(s_crc, f_head);
          end
        end else begin
          cell_out.data <= 32'h0;  // padding after the end of a frame
        end
      end
    end
  end

  // A cell whose header announced the frame end must really contain it, and
  // the FIFO never runs dry inside a cell (12 words or a frame end were held).
  a_no_underrun: assert property (@(posedge clk) disable iff (!rst_n)
    (s_busy && s_idx >= 4'd2 && !s_done) |-> f_count != '0);
  a_no_fifo_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    up_in.dataen |-> f_count != (AW+1)'(SEG_DEPTH));
endmodule
