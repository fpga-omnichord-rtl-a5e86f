// tb_sd_data_pkg: contents of the simulated SD card.
//
// The card holds one note after another, each NOTE_BYTES long (a whole number
// of 512-byte sectors). Of each note the first PCM_BYTES bytes are audio and
// the rest is zero padding. Audio bytes follow a fixed hash of the address,
// with a zero wherever the hash gives 0 and at every 97th byte, standing in for
// the zero samples that end each full wave period.
package tb_sd_data_pkg;
  function automatic logic [7:0] sd_byte(input longint unsigned addr,
                                         input longint unsigned note_bytes,
                                         input longint unsigned pcm_bytes);
    longint unsigned off, h;
    off = addr % note_bytes;
    if (off >= pcm_bytes) return 8'h00;
    if (off % 97 == 96) return 8'h00;
    h = (addr * 2654435761) ^ (addr >> 7);
    return 8'(h >> 11);
  endfunction
endpackage
