// nsf_player: loads NSF music files from an SD card into memory and drives
// playback. It is a main device on the memory bus.
// 1. Scan: after reset it reads sectors 0,1,2,... and records the sector of
//    every sector that starts with "NESM" (up to MAX_FILES files) and the
//    song count from that header; it stops at a sector starting with
//    "END DATA" and raises scan_done. num_songs is the song count of the
//    file currently on the 'file' input, so songs can be chosen before the
//    file is loaded.
// 2. On a file_select pulse it latches 'file' and 'song', holds the CPU in
//    reset, writes 0 to $0000-$7FFF, and reads the 128-byte header of the
//    file (load/INIT/PLAY addresses, NTSC play period, eight bank init
//    values).
// 3. READ_DATA: the code following the header (from byte 128 of the first
//    sector up to the next file's first sector) is written byte by byte to
//    $8000-$8FFF through bank 0: before each stretch the current bank
//    number is written to $5FF8. When the 4 kB window is full the rest of
//    the sector is ignored, the bank advances and the same sector is read
//    again, skipping the bytes already stored. The end-of-sector check
//    comes after the end-of-bank check, so a coincidence switches the bank
//    first and then moves to the next sector. A file with all-zero bank
//    values is placed linearly from its load address; a banked file starts
//    in bank 0 at offset load[11:0].
// 4. It then writes the 37-byte playback stub at $5000-$5024 (INIT and PLAY
//    addresses patched in), $5080=0, $5081=song, $5082=0 (NTSC), the bank
//    values at $5FF8-$5FFF and the vectors $FFFC/D=$5021, $FFFE/F=$5000.
// 5. Play: it releases the CPU reset and emits a one-clock irq every
//    play-period microseconds (CLK_MHZ clocks per microsecond). play_pause
//    toggles cpu_stall; a new file_select restarts at step 2.
// SD interface: sd_rd is a one-clock request for the 512-byte sector at
// byte address sd_addr, accepted while sd_ready; each byte arrives with a
// one-clock sd_byte_available. Bus writes hold bus_wr until bus_grant.
// The player does not buffer SD bytes: a data byte must be granted the bus
// before the next byte arrives. In this system that holds because the CPU
// and APU are kept in reset during a load, and the debugger (the only
// higher-priority device) is not expected to access memory at that time.
module nsf_player #(
  parameter int MAX_FILES = 16,
  parameter int CLK_MHZ   = 25,
  parameter int PRG_AW    = 18,        // program RAM size, in address bits
  parameter logic [15:0] CLEAR_TOP = 16'h7FFF
) (
  input  logic        clk,
  input  logic        rst,
  // SD controller
  output logic        sd_rd,
  output logic [31:0] sd_addr,
  input  logic [7:0]  sd_dout,
  input  logic        sd_byte_available,
  input  logic        sd_ready,
  // user control
  input  logic        file_select,
  input  logic [3:0]  file,
  input  logic [7:0]  song,
  input  logic        play_pause,
  output logic [4:0]  num_files,
  output logic        scan_done,
  output logic [7:0]  num_songs,
  output logic        playing,
  // memory bus (main device)
  output logic [15:0] bus_addr,
  output logic [7:0]  bus_wdata,
  output logic        bus_wr,
  input  logic        bus_grant,
  // CPU control
  output logic        cpu_rst,
  output logic        cpu_stall,
  output logic        irq
);
  typedef enum logic [3:0] {
    P_SCAN_REQ, P_SCAN_READ, P_IDLE, P_CLEAR, P_HDR_REQ, P_HDR_READ,
    P_SET_BANK, P_DATA_REQ, P_DATA_READ, P_DATA_DRAIN, P_INIT, P_PLAY
  } pstate_t;

  pstate_t     state;
  logic [31:0] sector;
  logic [9:0]  byte_idx;
  logic [63:0] head;            // first eight bytes of a scanned sector
  logic [31:0] file_sec [MAX_FILES];
  logic [7:0]  file_songs [MAX_FILES];   // song count of each file (header byte 6)
  logic [31:0] end_sec;
  logic [3:0]  cur_file;
  logic [7:0]  cur_song;
  logic [15:0] load_addr, init_addr, play_addr, speed;
  logic [7:0]  bank_init [8];
  logic        banked;
  logic [7:0]  cur_bank;
  logic [11:0] offset;
  logic [9:0]  skip;
  logic [31:0] data_end;
  logic [5:0]  init_idx;
  logic [31:0] irq_cnt, irq_period;
  logic        sd_busy;          // request accepted, sector in flight
  logic [15:0] ia;
  logic [15:0] clr_addr;
  logic        clr_done;
  logic [7:0]  id;

  // Playback stub and initial values, one (address, byte) pair per index.
  always_comb begin
    ia = 16'h5000 + 16'(init_idx);
    id = 8'h00;
    case (init_idx)
      6'd0:  id = 8'h78;                         // SEI
      6'd1:  id = 8'hA2;  6'd2: id = 8'hFF;      // LDX #$FF
      6'd3:  id = 8'h9A;                         // TXS
      6'd4:  id = 8'hAD;  6'd5: id = 8'h80;  6'd6: id = 8'h50;   // LDA $5080
      6'd7:  id = 8'hC9;  6'd8: id = 8'h81;      // CMP #$81
      6'd9:  id = 8'hD0;  6'd10: id = 8'h06;     // BNE $5011
      6'd11: id = 8'h20;  6'd12: id = play_addr[7:0]; 6'd13: id = play_addr[15:8]; // JSR PLAY
      6'd14: id = 8'h4C;  6'd15: id = 8'h21; 6'd16: id = 8'h50;  // JMP $5021
      6'd17: id = 8'hA9;  6'd18: id = 8'h81;     // LDA #$81
      6'd19: id = 8'h8D;  6'd20: id = 8'h80; 6'd21: id = 8'h50;  // STA $5080
      6'd22: id = 8'hAD;  6'd23: id = 8'h81; 6'd24: id = 8'h50;  // LDA $5081
      6'd25: id = 8'hAE;  6'd26: id = 8'h82; 6'd27: id = 8'h50;  // LDX $5082
      6'd28: id = 8'hA0;  6'd29: id = 8'h00;     // LDY #$00
      6'd30: id = 8'h20;  6'd31: id = init_addr[7:0]; 6'd32: id = init_addr[15:8]; // JSR INIT
      6'd33: id = 8'h58;                         // CLI
      6'd34: id = 8'h4C;  6'd35: id = 8'h22; 6'd36: id = 8'h50;  // JMP $5022
      6'd37: begin ia = 16'h5080; id = 8'h00;     end
      6'd38: begin ia = 16'h5081; id = cur_song;  end
      6'd39: begin ia = 16'h5082; id = 8'h00;     end
      6'd48: begin ia = 16'hFFFC; id = 8'h21;     end
      6'd49: begin ia = 16'hFFFD; id = 8'h50;     end
      6'd50: begin ia = 16'hFFFE; id = 8'h00;     end
      6'd51: begin ia = 16'hFFFF; id = 8'h50;     end
      default: begin                             // 40..47: bank registers
        ia = 16'h5FF8 + 16'(init_idx[2:0]);
        id = banked ? bank_init[init_idx[2:0]] : 8'(init_idx[2:0]);
      end
    endcase
  end

  assign sd_addr   = sector << 9;
  assign num_songs = file_songs[file];
  assign playing   = (state == P_PLAY);
  assign irq_period = 32'(speed) * 32'(CLK_MHZ);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= P_SCAN_REQ;
      sector    <= '0;
      byte_idx  <= '0;
      head      <= '0;
      num_files <= '0;
      scan_done <= 1'b0;
      end_sec   <= '0;
      for (int i = 0; i < MAX_FILES; i++) begin
        file_sec[i]   <= '0;
        file_songs[i] <= '0;
      end
      for (int i = 0; i < 8; i++) bank_init[i] <= '0;
      cur_file  <= '0; cur_song <= '0;
      load_addr <= '0; init_addr <= '0; play_addr <= '0; speed <= 16'd16639;
      banked    <= 1'b0;
      cur_bank  <= '0; offset <= '0; skip <= '0; data_end <= '0;
      init_idx  <= '0; irq_cnt <= '0;
      clr_addr  <= '0; clr_done <= 1'b0;
      sd_rd     <= 1'b0; sd_busy <= 1'b0;
      bus_addr  <= '0; bus_wdata <= '0; bus_wr <= 1'b0;
      cpu_rst   <= 1'b1; cpu_stall <= 1'b1; irq <= 1'b0;
    end else begin
      sd_rd <= 1'b0;
      irq   <= 1'b0;
      if (bus_wr && bus_grant) bus_wr <= 1'b0;
      if (sd_rd) sd_busy <= 1'b1;

      if (file_select && scan_done && state inside {P_IDLE, P_PLAY}) begin
        cur_file  <= file;
        cur_song  <= song;
        cpu_rst   <= 1'b1;
        cpu_stall <= 1'b1;
        clr_addr  <= 16'h0000;
        clr_done  <= 1'b0;
        state     <= P_CLEAR;
      end else case (state)
        // ------------------------------------------------------ scan
        P_SCAN_REQ: if (sd_ready && !sd_rd && !sd_busy) begin
          sd_rd    <= 1'b1;
          byte_idx <= '0;
          state    <= P_SCAN_READ;
        end
        P_SCAN_READ: begin
          if (sd_byte_available) begin
            byte_idx <= byte_idx + 1'b1;
            if (byte_idx < 10'd8) head <= {head[55:0], sd_dout};
          end
          if (sd_busy && sd_ready && !sd_rd) begin    // sector complete
            sd_busy <= 1'b0;
            if (head == "END DATA") begin
              end_sec   <= sector;
              scan_done <= 1'b1;
              state     <= P_IDLE;
            end else begin
              if (head[63:32] == "NESM" && num_files < 5'(MAX_FILES)) begin
                file_sec[num_files[3:0]]   <= sector;
                file_songs[num_files[3:0]] <= head[15:8];
                num_files <= num_files + 1'b1;
              end
              sector <= sector + 1'b1;
              state  <= P_SCAN_REQ;
            end
          end
        end
        P_IDLE: ;
        // ------------------------------------------------ clear RAM
        P_CLEAR: if (!bus_wr) begin
          if (clr_done) begin
            sector   <= file_sec[cur_file];
            data_end <= (32'(cur_file) + 1 < 32'(num_files)) ?
                        file_sec[cur_file + 4'd1] : end_sec;
            state    <= P_HDR_REQ;
          end else begin
            bus_addr  <= clr_addr;
            bus_wdata <= 8'h00;
            bus_wr    <= 1'b1;
            if (clr_addr == CLEAR_TOP) clr_done <= 1'b1;
            else                       clr_addr <= clr_addr + 1'b1;
          end
        end
        // ---------------------------------------------- header read
        P_HDR_REQ: if (sd_ready && !sd_rd && !sd_busy) begin
          sd_rd    <= 1'b1;
          byte_idx <= '0;
          state    <= P_HDR_READ;
        end
        P_HDR_READ: begin
          if (sd_byte_available) begin
            byte_idx <= byte_idx + 1'b1;
            case (byte_idx)
              10'h008: load_addr[7:0]    <= sd_dout;
              10'h009: load_addr[15:8]   <= sd_dout;
              10'h00A: init_addr[7:0]    <= sd_dout;
              10'h00B: init_addr[15:8]   <= sd_dout;
              10'h00C: play_addr[7:0]    <= sd_dout;
              10'h00D: play_addr[15:8]   <= sd_dout;
              10'h06E: speed[7:0]        <= sd_dout;
              10'h06F: speed[15:8]       <= sd_dout;
              default: if (byte_idx >= 10'h070 && byte_idx < 10'h078)
                         bank_init[byte_idx[2:0]] <= sd_dout;
            endcase
          end
          if (sd_busy && sd_ready && !sd_rd) begin
            sd_busy  <= 1'b0;
            banked   <= (bank_init[0] | bank_init[1] | bank_init[2] | bank_init[3] |
                         bank_init[4] | bank_init[5] | bank_init[6] | bank_init[7]) != 8'h00;
            skip     <= 10'd128;
            state    <= P_SET_BANK;
            offset   <= load_addr[11:0];
            cur_bank <= (bank_init[0] | bank_init[1] | bank_init[2] | bank_init[3] |
                         bank_init[4] | bank_init[5] | bank_init[6] | bank_init[7]) != 8'h00
                        ? 8'h00 : 8'(load_addr[14:12]);
          end
        end
        // ------------------------------------------------ data load
        P_SET_BANK: if (!bus_wr) begin
          bus_addr  <= 16'h5FF8;
          bus_wdata <= cur_bank;
          bus_wr    <= 1'b1;
          state     <= P_DATA_REQ;
        end
        P_DATA_REQ: if (!bus_wr) begin
          if (sector >= data_end || cur_bank >= 8'(2 ** (PRG_AW - 12))) begin
            init_idx <= '0;
            state    <= P_INIT;
          end else if (sd_ready && !sd_rd && !sd_busy) begin
            sd_rd    <= 1'b1;
            byte_idx <= '0;
            state    <= P_DATA_READ;
          end
        end
        P_DATA_READ: if (sd_byte_available) begin
          byte_idx <= byte_idx + 1'b1;
          if (byte_idx >= skip) begin
            bus_addr  <= 16'h8000 | 16'(offset);
            bus_wdata <= sd_dout;
            bus_wr    <= 1'b1;
            offset    <= offset + 1'b1;
            if (offset == 12'hFFF) begin          // end of bank
              cur_bank <= cur_bank + 1'b1;
              skip     <= byte_idx + 1'b1;
              state    <= P_DATA_DRAIN;
            end else if (byte_idx == 10'd511) begin   // end of sector
              skip  <= '0;
              state <= P_DATA_DRAIN;
            end
          end
        end
        P_DATA_DRAIN: if (sd_busy && sd_ready && !sd_rd) begin
          sd_busy <= 1'b0;
          if (skip == 10'd512 || skip == 10'd0) begin
            skip   <= '0;
            sector <= sector + 1'b1;
          end
          state <= (offset == 12'h000) ? P_SET_BANK : P_DATA_REQ;
        end
        // ------------------------------------------ init values
        P_INIT: if (!bus_wr) begin
          if (init_idx == 6'd52) begin
            cpu_rst   <= 1'b0;
            cpu_stall <= 1'b0;
            irq_cnt   <= '0;
            state     <= P_PLAY;
          end else begin
            bus_addr  <= ia;
            bus_wdata <= id;
            bus_wr    <= 1'b1;
            init_idx  <= init_idx + 1'b1;
          end
        end
        // ---------------------------------------------------- play
        P_PLAY: begin
          if (play_pause) cpu_stall <= ~cpu_stall;
          if (irq_cnt + 1 >= irq_period) begin
            irq_cnt <= '0;
            irq     <= 1'b1;
          end else begin
            irq_cnt <= irq_cnt + 1'b1;
          end
        end
        default: state <= P_IDLE;
      endcase
    end
  end
endmodule
